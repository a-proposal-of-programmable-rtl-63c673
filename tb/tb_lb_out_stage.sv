// tb_lb_out_stage: self-checking test of the output flip-flops and bypass
// selectors. Random LUT values and selects; a registered output must show the
// previous cycle's value, a bypassed one the current value.
module tb_lb_out_stage;
  logic clk = 1'b0, rst;
  logic [2:0] d, use_ff, q, prev, exp;
  int checks = 0, failures = 0;

  lb_out_stage #(.NOUT(3)) dut (.clk, .rst, .d, .use_ff, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 3'b111; use_ff = 3'b111;
    @(negedge clk);
    rst = 0;
    prev = 3'b000;
    checks++;
    if (q !== 3'b000) begin failures++; $display("reset value %b", q); end
    for (int n = 0; n < 1000; n++) begin
      d      = 3'($urandom());
      use_ff = 3'($urandom());
      #2;
      for (int j = 0; j < 3; j++) exp[j] = use_ff[j] ? prev[j] : d[j];
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("n=%0d d=%b sel=%b q=%b exp=%b", n, d, use_ff, q, exp);
      end
      @(negedge clk);
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
