// tb_matched_filter: self-checking testbench of the serial matched filter.
// Streams 400 random 7-sample windows (back to back and with idle gaps) with
// random 16-bit signed templates and thresholds, and compares the filter
// output sum_i y[i]*f[i] and the decision output > threshold with a
// reference computed in the testbench. The result must appear exactly one
// clock after the last sample. Both decisions must occur.
module tb_matched_filter;
  localparam int WIN = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sample = '0;
  logic valid = 1'b0, first = 1'b0, last = 1'b0;
  logic signed [15:0] coef [WIN];
  logic signed [31:0] threshold = '0, mf_out;
  logic mf_valid, mf_accept;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;

  matched_filter #(.SAMPLE_W(8), .COEF_W(16), .WIN(WIN), .OUT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WIN; i++) coef[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int w = 0; w < 400; w++) begin
      longint acc;
      logic [7:0] y [WIN];
      if (w % 20 == 0) begin
        for (int i = 0; i < WIN; i++) coef[i] = 16'($urandom);
      end
      acc = 0;
      for (int i = 0; i < WIN; i++) begin
        y[i] = 8'($urandom);
        acc += longint'(y[i]) * longint'(coef[i]);
      end
      threshold = 32'($urandom_range(4000000)) - 32'sd2000000;
      for (int i = 0; i < WIN; i++) begin
        sample = y[i]; valid = 1'b1; first = (i == 0); last = (i == WIN-1);
        @(posedge clk);
        #1;
        if (i < WIN-1) check(!mf_valid || i == 0, "no early result");
      end
      valid = 1'b0; first = 1'b0; last = 1'b0;
      // the result is visible right after the clock that took the last sample
      check(mf_valid, "result latency");
      check(mf_out == 32'(acc), $sformatf("filter output %0d exp %0d", mf_out, acc));
      check(mf_accept == (acc > longint'(threshold)), "decision");
      if (mf_accept) n_acc++; else n_rej++;
      if (w % 3 == 0) begin repeat ($urandom_range(3)) @(posedge clk); #1; end
    end
    check(n_acc > 0 && n_rej > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
