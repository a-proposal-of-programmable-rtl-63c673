// tb_alu16_mcmg: the 8-operation, 16-bit ALU used to evaluate the
// multi-context modes, mapped onto 32 logic blocks and run against a
// behavioural ALU.
//
// Mapping (one context plane per operation, the operation code C acting as the
// context switch):
//   chain row, block i : inputs {a_i, b_i, chain_(i-1)} -> chain_i (unregistered)
//                        ADD: carry = maj, NE: (a^b)|c, GT: a_i!=b_i ? a_i : c,
//                        SHIFT: a_i, other operations: 0
//   result row, block i: inputs {a_i, b_i, x_i}, x_i = chain_(i-1), x_0 = chain_15
//                        OR, AND, XOR, NOT A, ADD (a^b^x), SHIFT (x, i.e. A<<1),
//                        NE/GT: result in bit 0 (x), other bits 0.
//                        Output registered: Q is the output flip-flop row.
// Operation codes: 0 OR, 1 AND, 2 XOR, 3 NOT A, 4 ADD, 5 NE, 6 GT, 7 SHL1.
//
// Phase 1 runs every block in mode (d), 3-LUT x 8 planes, ctx_sel = C.
// Phase 2 writes mode (e), 4-LUT x 4 planes, into cache slot 1 of every block
// while phase-1 operations are still running, loads it, and reruns: C[0] then
// enters as the 4th LUT input and C[2:1] selects the plane. The table bit for
// {C, x, b, a} is at the same index in both modes, so both contexts carry the
// same 64 bits with different mode codes.
// Q is checked one clock after A, B and C are applied.
module tb_alu16_mcmg;
  import mcmg_pkg::*;

  localparam int W = 16;
  localparam int NOPS = 8;
  localparam int NVEC = 3000;

  logic clk = 1'b0, rst;
  logic [W-1:0] a, b, q, chain;
  logic [2:0] c;
  logic mode_e;
  logic wr_en, load;
  logic [3:0] wr_addr, load_addr;
  context_t chain_ctx [W], res_ctx [W];
  context_t wr_chain [W], wr_res [W];
  logic [2:0] unused_c [W], unused_r [W];
  lut_mode_e  mode_c [W], mode_r [W];
  logic [3:0] slot_c [W], slot_r [W];
  logic       ld_c [W], ld_r [W];
  int checks = 0, failures = 0;
  int op_count [NOPS];

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- tables
  function automatic logic chain_fn(int op, logic av, logic bv, logic cv);
    case (op)
      4:       return (av & bv) | (av & cv) | (bv & cv);
      5:       return (av ^ bv) | cv;
      6:       return (av != bv) ? av : cv;
      7:       return av;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic result_fn(int op, int bit_i, logic av, logic bv, logic xv);
    case (op)
      0: return av | bv;
      1: return av & bv;
      2: return av ^ bv;
      3: return ~av;
      4: return (bit_i == 0) ? (av ^ bv) : (av ^ bv ^ xv);
      5, 6: return (bit_i == 0) ? xv : 1'b0;
      default: return (bit_i == 0) ? 1'b0 : xv;
    endcase
  endfunction

  // 64-bit table: bit {op, x, b, a}
  function automatic logic [63:0] table_of(bit is_chain, int bit_i);
    logic [63:0] t;
    for (int op = 0; op < NOPS; op++)
      for (int v = 0; v < 8; v++)
        t[op*8 + v] = is_chain ? chain_fn(op, v[0], v[1], v[2])
                               : result_fn(op, bit_i, v[0], v[1], v[2]);
    return t;
  endfunction

  // ---------------------------------------------------------------- array
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic [5:0] in_c, in_r;
    logic [2:0] sel, out_c, out_r;
    logic x;
    assign x    = (i == 0) ? chain[W-1] : chain[(i+W-1) % W];
    assign sel  = mode_e ? {1'b0, c[2:1]} : c;
    assign in_c = {2'b00, mode_e & c[0], (i == 0) ? 1'b0 : chain[(i+W-1) % W], b[i], a[i]};
    assign in_r = {2'b00, mode_e & c[0], x, b[i], a[i]};

    rc_logic_block u_chain (
      .clk, .rst, .lut_in(in_c), .ctx_sel(sel),
      .cdc_wr_en(wr_en), .cdc_wr_addr(wr_addr), .cdc_wr_data(wr_chain[i]),
      .ctx_load(load), .ctx_load_addr(load_addr),
      .lb_out(out_c), .active_mode(mode_c[i]), .active_slot(slot_c[i]), .ctx_loaded(ld_c[i])
    );
    rc_logic_block u_res (
      .clk, .rst, .lut_in(in_r), .ctx_sel(sel),
      .cdc_wr_en(wr_en), .cdc_wr_addr(wr_addr), .cdc_wr_data(wr_res[i]),
      .ctx_load(load), .ctx_load_addr(load_addr),
      .lb_out(out_r), .active_mode(mode_r[i]), .active_slot(slot_r[i]), .ctx_loaded(ld_r[i])
    );
    assign chain[i] = out_c[0];
    assign q[i]     = out_r[0];
    assign unused_c[i] = out_c;
    assign unused_r[i] = out_r;
  end

  // ---------------------------------------------------------------- reference
  function automatic logic [W-1:0] alu_ref(int op, logic [W-1:0] av, logic [W-1:0] bv);
    case (op)
      0: return av | bv;
      1: return av & bv;
      2: return av ^ bv;
      3: return ~av;
      4: return av + bv;
      5: return W'(av != bv);
      6: return W'(av > bv);
      default: return av << 1;
    endcase
  endfunction

  initial begin
    repeat (2 * NVEC + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_contexts(lut_mode_e m);
    for (int i = 0; i < W; i++) begin
      wr_chain[i].bits   = table_of(1'b1, i);
      wr_chain[i].mode   = m;
      wr_chain[i].use_ff = 3'b000;
      wr_res[i].bits     = table_of(1'b0, i);
      wr_res[i].mode     = m;
      wr_res[i].use_ff   = 3'b001;
    end
  endtask

  task automatic run_vectors(int n, bit write_slot1);
    logic [W-1:0] exp;
    int op;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      a  = W'($urandom());
      b  = (k % 5 == 0) ? a : W'($urandom());   // exercise equality for NE/GT
      op = (k < NOPS) ? k : $urandom_range(0, NOPS-1);
      c  = 3'(op);
      // halfway through, write the other mode into slot 1 while the ALU runs
      if (write_slot1 && k == n / 2) begin
        set_contexts(MODE_E_4LUT_P4);
        wr_en = 1; wr_addr = 4'd1;
      end else wr_en = 0;
      exp = alu_ref(op, a, b);
      @(posedge clk);
      #1;
      checks++;
      op_count[op]++;
      if (q !== exp) begin
        failures++;
        if (failures < 10)
          $display("mode_e=%0d op=%0d a=%h b=%h q=%h exp=%h", mode_e, op, a, b, q, exp);
      end
    end
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    rst = 1; a = '0; b = '0; c = '0; mode_e = 0;
    wr_en = 0; load = 0; wr_addr = '0; load_addr = '0;
    @(negedge clk);
    rst = 0;
    // configure slot 0 with mode (d) and load it
    set_contexts(MODE_D_3LUT_P8);
    wr_en = 1; wr_addr = 4'd0;
    @(negedge clk);
    wr_en = 0; load = 1; load_addr = 4'd0;
    @(negedge clk);
    load = 0;
    checks++;
    if (mode_c[0] != MODE_D_3LUT_P8 || mode_r[W-1] != MODE_D_3LUT_P8) begin
      failures++; $display("mode (d) not loaded");
    end
    run_vectors(NVEC, 1'b1);
    // switch every block to the mode (e) context in slot 1: one clock
    load = 1; load_addr = 4'd1;
    @(negedge clk);
    load = 0; mode_e = 1;
    checks++;
    if (mode_c[3] != MODE_E_4LUT_P4 || slot_r[5] != 4'd1) begin
      failures++; $display("mode (e) not loaded");
    end
    run_vectors(NVEC, 1'b0);
    for (int op = 0; op < NOPS; op++) begin
      checks++;
      $display("operation %0d: %0d vectors", op, op_count[op]);
      if (op_count[op] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
