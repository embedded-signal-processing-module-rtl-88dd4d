// tb_cfg_regs: self-checking testbench of the configuration/debug register
// bank. Checks reset values, writes random values to every register of the
// map, checks the decoded outputs (with sign extension of coefficients and
// delays on read-back), reads every address back with its one-clock latency,
// and reads the debug inputs through 0x80..0x84. Unmapped addresses read 0.
module tb_cfg_regs;
  localparam int N_ADC = 32, WIN = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic [31:0] dbg [5];
  logic [31:0] run_number, source_id;
  logic signed [31:0] threshold;
  logic signed [15:0] coef [WIN];
  logic signed [7:0] delay [N_ADC];
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  cfg_regs #(.N_ADC(N_ADC), .WIN(WIN), .COEF_W(16), .DELAY_W(8), .N_DBG(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk);
    #1 cfg_we = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    cfg_addr = a;
    @(posedge clk);
    #1 d = cfg_rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 5; i++) dbg[i] = $urandom;
    for (int a = 0; a < 256; a++) model[a] = '0;
    for (int i = 0; i < 5; i++) model[8'h80 + i] = dbg[i];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check(run_number == 0 && threshold == 0 && delay[5] == 0 && coef[3] == 0, "reset values");
    for (int a = 0; a < 3; a++) begin
      d = $urandom; wr(8'(a), d); model[a] = d;
    end
    for (int i = 0; i < WIN; i++) begin
      d = $urandom; wr(8'(8'h10 + i), d); model[8'h10 + i] = 32'(signed'(d[15:0]));
    end
    for (int c = 0; c < N_ADC; c++) begin
      d = $urandom; wr(8'(8'h40 + c), d); model[8'h40 + c] = 32'(signed'(d[7:0]));
    end
    // writes to read-only or unmapped addresses change nothing
    wr(8'h80, 32'h1234_5678);
    wr(8'hF0, 32'h1234_5678);
    #1;
    check(run_number == model[0] && source_id == model[1] && threshold == model[2], $sformatf("scalar outputs %h %h %h %h", run_number, model[0], threshold, model[2]));
    for (int i = 0; i < WIN; i++) check(32'(coef[i]) == model[8'h10 + i], "coefficient output");
    for (int c = 0; c < N_ADC; c++) check(32'(delay[c]) == model[8'h40 + c], "delay output");
    for (int a = 0; a < 256; a++) begin
      rd(8'(a), d);
      check(d == model[a], $sformatf("read back 0x%02x: %h exp %h", a, d, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
