// tb_cdc: self-checking test of the configuration data cache. Fills every
// slot, reads all back, checks that cycles with wr_en low write nothing, and
// that a read of the slot being written returns the old contents until the
// clock edge.
module tb_cdc;
  import mcmg_pkg::*;
  import mcmg_ref_pkg::*;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic wr_en;
  logic [3:0] wr_addr, rd_addr;
  context_t wr_data, rd_data;
  context_t model [DEPTH];
  int checks = 0, failures = 0;

  cdc #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(int a);
    rd_addr = 4'(a);
    #1;
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("slot %0d got %h exp %h", a, rd_data, model[a]);
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = '0; rd_addr = 0;
    // fill every slot
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(a); wr_data = rand_context();
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < DEPTH; a++) check_read(a);
    // random traffic; wr_en low cycles carry data that must not be written
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wr_en   = $urandom_range(0, 1) == 1;
      wr_addr = 4'($urandom_range(0, DEPTH-1));
      wr_data = rand_context();
      // read the written slot before the edge: old contents
      check_read(int'(wr_addr));
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      check_read(int'(wr_addr));
      check_read($urandom_range(0, DEPTH-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
