// tb_cfg_ctrl: self-checking test of the LUT control logic. A behavioural
// cache array answers the control logic's reads. Checks reset to an all-zero
// context, one-cycle context loads (table, mode, output selects and slot),
// that the context holds without load, and the one-cycle loaded pulse.
module tb_cfg_ctrl;
  import mcmg_pkg::*;
  import mcmg_ref_pkg::*;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst, load, loaded;
  logic [3:0] load_addr, cdc_rd_addr, active_slot;
  context_t cdc_rd_data, active, exp_active;
  context_t store [DEPTH];
  logic [3:0] exp_slot;
  logic exp_loaded;
  int checks = 0, failures = 0;

  cfg_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst, .load, .load_addr, .cdc_rd_addr,
                                 .cdc_rd_data, .active, .active_slot, .loaded);

  assign cdc_rd_data = store[cdc_rd_addr];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (active !== exp_active || active_slot !== exp_slot || loaded !== exp_loaded) begin
      failures++;
      if (failures < 10)
        $display("t=%0t active=%h/%h slot=%0d/%0d loaded=%b/%b", $time, active, exp_active,
                 active_slot, exp_slot, loaded, exp_loaded);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      store[a] = rand_context();
      store[a].mode = lut_mode_e'(a % 8);  // every mode code appears
    end
    rst = 1; load = 1; load_addr = 4'd3;
    @(negedge clk);
    rst = 0; load = 0;
    exp_active = '0; exp_slot = '0; exp_loaded = 0;
    check();  // reset wins over load
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      load      = $urandom_range(0, 2) == 0;
      load_addr = 4'($urandom_range(0, DEPTH-1));
      @(posedge clk);
      exp_loaded = load;
      if (load) begin
        exp_active = store[load_addr];
        exp_slot   = load_addr;
      end
      #1;
      check();
      if (n % 50 == 25) begin
        // reset mid-run clears the context again
        @(negedge clk); rst = 1; load = 0;
        @(posedge clk); #1;
        exp_active = '0; exp_slot = '0; exp_loaded = 0;
        check();
        @(negedge clk); rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
