// tb_l1_mem: self-checking testbench of the level-1 circular memory.
// Writes a new pseudo-random sample every clock at an incrementing address
// (wrapping over all 256 positions several times) and reads back random
// addresses that were already written, comparing the registered read data,
// one clock later, with a shadow copy kept by the testbench.
module tb_l1_mem;
  localparam int unsigned DEPTH = 256;
  logic clk = 1'b0;
  logic [7:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;
  logic [7:0] shadow [DEPTH];
  logic [DEPTH-1:0] written;
  int checks = 0, failures = 0;

  l1_mem #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_q;
    logic       exp_v;
    wr_addr = '0; rd_addr = '0; wr_data = '0; written = '0; exp_v = 1'b0; exp_q = '0;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      wr_data = 8'($urandom);
      rd_addr = 8'($urandom);
      exp_v = written[rd_addr];
      exp_q = shadow[rd_addr];
      @(posedge clk);
      // registered read: data for this rd_addr, before this clock's write
      #1;
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_q) begin
          failures++;
          $display("mismatch cyc %0d: got %02x exp %02x", cyc, rd_data, exp_q);
        end
      end
      shadow[wr_addr]  = wr_data;
      written[wr_addr] = 1'b1;
      wr_addr = wr_addr + 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
