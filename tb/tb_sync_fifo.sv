// tb_sync_fifo: self-checking testbench of the first-word-fall-through FIFO.
// Random pushes and pops against a queue model: checks the head word, the
// empty/full flags and the count every clock, and that a push into a full
// FIFO is dropped and flagged by overflow one clock later. Runs phases with
// more pushes than pops (reaches full) and more pops than pushes.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  logic exp_ovf = 1'b0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int pw;
      pw = (cyc / 500) % 2 == 0 ? 70 : 30;
      #1;
      // compare state before this clock
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(overflow == exp_ovf, "overflow");
      if (model.size() != 0) check(rd_data == model[0], "head");
      wr_en   = ($urandom_range(99) < pw);
      rd_en   = ($urandom_range(99) < 100 - pw);
      wr_data = W'($urandom);
      exp_ovf = wr_en && (model.size() == D);
      if (exp_ovf) n_ovf++;
      if (model.size() == D) n_full++;
      begin
        bit do_w, do_r;
        do_w = wr_en && (model.size() != D);
        do_r = rd_en && (model.size() != 0);
        @(posedge clk);
        if (do_r) void'(model.pop_front());
        if (do_w) model.push_back(wr_data);
      end
    end
    check(n_full > 0 && n_ovf > 0, "full and overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
