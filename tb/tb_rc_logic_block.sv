// tb_rc_logic_block: end-to-end test of the logic block at its default size
// (16-context cache). A random stream of cache writes, context loads, LUT
// inputs and plane selects runs against a cycle model of the block built from
// the reference LUT: a cache array, the active context and the output
// flip-flops. Every output is compared every cycle.
//
// It also counts the mechanisms of the block and fails if one never happened:
// each of the six modes active, a plane switch in modes (d)-(f), a cache write
// while the LUT is running, a write and a load of the same slot in one cycle
// (the load must see the old contents), registered and bypassed outputs, and
// a one-cycle context load (checked by the ctx_loaded pulse and by the new
// context's outputs one cycle after the request).
module tb_rc_logic_block;
  import mcmg_pkg::*;
  import mcmg_ref_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int NCYC = 40000;

  logic clk = 1'b0, rst;
  logic [5:0] lut_in;
  logic [2:0] ctx_sel;
  logic cdc_wr_en, ctx_load, ctx_loaded;
  logic [3:0] cdc_wr_addr, ctx_load_addr, active_slot;
  context_t cdc_wr_data;
  logic [2:0] lb_out;
  lut_mode_e active_mode;

  rc_logic_block dut (
    .clk, .rst, .lut_in, .ctx_sel, .cdc_wr_en, .cdc_wr_addr, .cdc_wr_data,
    .ctx_load, .ctx_load_addr, .lb_out, .active_mode, .active_slot, .ctx_loaded
  );

  // cycle model
  context_t m_cdc [DEPTH];
  context_t m_act;
  logic [3:0] m_slot;
  logic [2:0] m_ff, m_comb, m_exp;
  logic m_loaded;
  logic [2:0] prev_ctx;

  int checks = 0, failures = 0;
  int mode_cycles [8];
  int n_plane_switch = 0, n_wr_running = 0, n_wr_load_same = 0;
  int n_reg_out = 0, n_byp_out = 0, n_loads = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("t=%0t %s got %h exp %h", $time, what, got, exp);
    end
  endtask

  initial begin
    rst = 1; lut_in = '0; ctx_sel = '0; cdc_wr_en = 0; cdc_wr_addr = '0;
    cdc_wr_data = '0; ctx_load = 0; ctx_load_addr = '0;
    @(negedge clk);
    rst = 0;
    m_act = '0; m_slot = '0; m_ff = '0; m_loaded = 0; prev_ctx = '0;
    // fill the cache: slot s holds mode s % 6 (the six modes), random tables
    for (int s = 0; s < int'(DEPTH); s++) begin
      cdc_wr_en = 1; cdc_wr_addr = 4'(s);
      cdc_wr_data = rand_context();
      cdc_wr_data.mode = lut_mode_e'(s % 6);
      @(posedge clk);
      m_ff = ref_lut(m_act.bits, m_act.mode, ctx_sel, lut_in);
      m_cdc[s] = cdc_wr_data;
      @(negedge clk);
    end
    cdc_wr_en = 0;
    for (int n = 0; n < NCYC; n++) begin
      // drive this cycle's stimulus
      lut_in  = 6'($urandom());
      ctx_sel = ($urandom_range(0, 3) == 0) ? 3'($urandom()) : prev_ctx;
      ctx_load      = $urandom_range(0, 15) == 0;
      ctx_load_addr = 4'($urandom_range(0, DEPTH-1));
      cdc_wr_en     = $urandom_range(0, 7) == 0;
      cdc_wr_addr   = ($urandom_range(0, 3) == 0) ? ctx_load_addr : 4'($urandom_range(0, DEPTH-1));
      cdc_wr_data   = rand_context();
      if ($urandom_range(0, 3) != 0) cdc_wr_data.mode = lut_mode_e'($urandom_range(0, 5));
      #1;
      // expected outputs before the edge
      m_comb = ref_lut(m_act.bits, m_act.mode, ctx_sel, lut_in);
      for (int j = 0; j < 3; j++) m_exp[j] = m_act.use_ff[j] ? m_ff[j] : m_comb[j];
      check("lb_out", 32'(lb_out), 32'(m_exp));
      check("mode", 32'(active_mode), 32'(m_act.mode));
      check("slot", 32'(active_slot), 32'(m_slot));
      check("loaded", 32'(ctx_loaded), 32'(m_loaded));
      // coverage of what happened this cycle
      mode_cycles[m_act.mode]++;
      if (m_act.mode inside {MODE_D_3LUT_P8, MODE_E_4LUT_P4, MODE_F_5LUT_P2} &&
          ctx_sel != prev_ctx) n_plane_switch++;
      if (cdc_wr_en && m_act.mode <= MODE_F_5LUT_P2) n_wr_running++;
      if (cdc_wr_en && ctx_load && cdc_wr_addr == ctx_load_addr) n_wr_load_same++;
      if (m_act.use_ff != 3'b000) n_reg_out++;
      if (m_act.use_ff != 3'b111) n_byp_out++;
      prev_ctx = ctx_sel;
      // clock edge: update the model
      @(posedge clk);
      m_ff = m_comb;
      m_loaded = ctx_load;
      if (ctx_load) begin
        m_act  = m_cdc[ctx_load_addr];  // old contents if written this cycle
        m_slot = ctx_load_addr;
        n_loads++;
      end
      if (cdc_wr_en) m_cdc[cdc_wr_addr] = cdc_wr_data;
      @(negedge clk);
    end
    // every mechanism must have happened
    for (int m = 0; m < 6; m++) begin
      $display("mode %0d active for %0d cycles", m, mode_cycles[m]);
      checks++;
      if (mode_cycles[m] == 0) begin failures++; $display("mode %0d never active", m); end
    end
    $display("plane switches %0d, cache writes while running %0d, write+load same slot %0d",
             n_plane_switch, n_wr_running, n_wr_load_same);
    $display("context loads %0d, registered-output cycles %0d, bypassed-output cycles %0d",
             n_loads, n_reg_out, n_byp_out);
    checks += 6;
    if (n_plane_switch == 0) begin failures++; $display("no plane switch"); end
    if (n_wr_running == 0)   begin failures++; $display("no write while running"); end
    if (n_wr_load_same == 0) begin failures++; $display("no write+load of one slot"); end
    if (n_loads == 0)        begin failures++; $display("no context load"); end
    if (n_reg_out == 0)      begin failures++; $display("no registered output"); end
    if (n_byp_out == 0)      begin failures++; $display("no bypassed output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
