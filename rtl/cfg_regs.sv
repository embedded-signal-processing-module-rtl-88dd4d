// cfg_regs: configuration register bank and debug read-back.
//
// A simple single-clock register bus (cfg_we, cfg_addr, cfg_wdata, cfg_rdata)
// holds what the fragment builder needs to be told from outside: the delay of
// each ADC channel (signed, in clocks, added to the L1 reference address), the
// matched-filter template f[0..WIN-1] and threshold gamma, and the run number
// and source identifier written into every fragment header. The same bus
// reads the debug counters. Read data is registered (one clock latency).
//
// Address map (32-bit words):
//   0x00 run number           0x01 source identifier    0x02 MF threshold
//   0x10 + i  MF coefficient i (i < WIN, sign-extended from COEF_W bits)
//   0x40 + c  delay of ADC channel c (c < N_ADC, sign-extended from DELAY_W)
//   0x80..0x84 debug counters (read only; see debug_counters)
// All registers reset to zero. The document states that channel delays are
// set through a configuration register on a dedicated data bus and that a
// debug structure gives external access; the bus and the map are this
// design's choices.
module cfg_regs #(
  parameter int unsigned N_ADC   = 32,
  parameter int unsigned WIN     = 7,
  parameter int unsigned COEF_W  = 16,
  parameter int unsigned DELAY_W = 8,
  parameter int unsigned N_DBG   = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [7:0]                cfg_addr,
  input  logic [31:0]               cfg_wdata,
  output logic [31:0]               cfg_rdata,
  input  logic [31:0]               dbg [N_DBG],
  output logic [31:0]               run_number,
  output logic [31:0]               source_id,
  output logic signed [31:0]        threshold,
  output logic signed [COEF_W-1:0]  coef  [WIN],
  output logic signed [DELAY_W-1:0] delay [N_ADC]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_number <= '0;
      source_id  <= '0;
      threshold  <= '0;
      for (int i = 0; i < WIN; i++)   coef[i]  <= '0;
      for (int c = 0; c < N_ADC; c++) delay[c] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == 8'h00) run_number <= cfg_wdata;
      if (cfg_addr == 8'h01) source_id  <= cfg_wdata;
      if (cfg_addr == 8'h02) threshold  <= cfg_wdata;
      for (int i = 0; i < WIN; i++)
        if (cfg_addr == 8'(8'h10 + i)) coef[i] <= COEF_W'(cfg_wdata);
      for (int c = 0; c < N_ADC; c++)
        if (cfg_addr == 8'(8'h40 + c)) delay[c] <= DELAY_W'(cfg_wdata);
    end
  end

  localparam int unsigned CIW = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int unsigned DIW = (N_ADC > 1) ? $clog2(N_ADC) : 1;
  localparam int unsigned BIW = (N_DBG > 1) ? $clog2(N_DBG) : 1;

  logic [31:0] rd_mux;
  logic [7:0]  ofs_coef, ofs_delay, ofs_dbg;

  assign ofs_coef  = cfg_addr - 8'h10;
  assign ofs_delay = cfg_addr - 8'h40;
  assign ofs_dbg   = cfg_addr - 8'h80;

  always_comb begin
    rd_mux = '0;
    if (cfg_addr == 8'h00)                 rd_mux = run_number;
    else if (cfg_addr == 8'h01)            rd_mux = source_id;
    else if (cfg_addr == 8'h02)            rd_mux = threshold;
    else if (ofs_coef < 8'(WIN))           rd_mux = 32'(coef[ofs_coef[CIW-1:0]]);
    else if (ofs_delay < 8'(N_ADC))        rd_mux = 32'(delay[ofs_delay[DIW-1:0]]);
    else if (ofs_dbg < 8'(N_DBG))          rd_mux = dbg[ofs_dbg[BIW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else        cfg_rdata <= rd_mux;
  end

endmodule
