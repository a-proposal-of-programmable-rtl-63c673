// tb_mcmg_lut: self-checking test of the MCMG LUT. For each of the 8 mode
// codes and several random tables, every input vector and every plane select
// is applied and the 3 outputs are compared with the reference model.
module tb_mcmg_lut;
  import mcmg_pkg::*;
  import mcmg_ref_pkg::*;

  logic [63:0] cfg_bits;
  lut_mode_e   mode;
  logic [2:0]  ctx_sel;
  logic [5:0]  lut_in;
  logic [2:0]  lut_out;
  int checks = 0, failures = 0;

  mcmg_lut dut (.cfg_bits, .mode, .ctx_sel, .lut_in, .lut_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    for (int m = 0; m < 8; m++) begin
      for (int t = 0; t < 4; t++) begin
        cfg_bits = (t == 0) ? 64'h0123_4567_89AB_CDEF ^ {32'(m), 32'(~m)} : {$urandom(), $urandom()};
        mode     = lut_mode_e'(m);
        for (int c = 0; c < 8; c++) begin
          for (int i = 0; i < 64; i++) begin
            ctx_sel = 3'(c);
            lut_in  = 6'(i);
            #1;
            exp = ref_lut(cfg_bits, 3'(m), 3'(c), 6'(i));
            checks++;
            if (lut_out !== exp) begin
              failures++;
              if (failures < 10)
                $display("mismatch mode=%0d ctx=%0d in=%0d got=%b exp=%b", m, c, i, lut_out, exp);
            end
          end
        end
      end
    end
    // Plane-by-plane check of mode (d): a table with one distinct byte per
    // plane makes every plane's 8 bits visible.
    cfg_bits = 64'hF0E1_D2C3_B4A5_9687;
    mode     = MODE_D_3LUT_P8;
    for (int c = 0; c < 8; c++) begin
      logic [7:0] got;
      ctx_sel = 3'(c);
      for (int i = 0; i < 8; i++) begin
        lut_in = 6'(i);
        #1;
        got[i] = lut_out[0];
      end
      checks++;
      if (got !== cfg_bits[c*8 +: 8]) begin
        failures++;
        $display("mode d plane %0d got %h", c, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
