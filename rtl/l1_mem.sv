// l1_mem: level-1 circular memory of a packet controller.
//
// Every clock the incoming sample is written at wr_addr, the free-running
// write pointer broadcast by the trigger control unit, so the memory always
// holds the last DEPTH samples (256 positions in the document). One read
// port with registered output (one clock of latency, block-RAM style) serves
// the window selection when a trigger is processed. The content is not reset;
// positions are read only after they have been written.
module l1_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    mem[wr_addr] <= wr_data;
    rd_data      <= mem[rd_addr];
  end

endmodule
