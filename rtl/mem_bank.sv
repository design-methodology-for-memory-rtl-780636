// mem_bank: a 4-way memory bank with its own address generation.
//
// Four single-port memories of DEPTH words sit behind a reordering crossbar;
// the bank's AGU supplies the address of every access, so a unit connected
// through the memory crossbar only says when to read or write. In narrow mode
// lane 0 reaches word A (the AGU address) in whichever memory holds it: one
// word per cycle, for single-port devices. In wide mode the four lanes reach
// words A + k*S, k = 0..3, in parallel, with S = 4^lstride, or 2*4^lstride
// when lhalf is set: four words per cycle, used by the radix-4 CMAC and the
// demapper. S = 2*4^e is conflict-free when digit e of A is 0 or 1 and digit
// e+1 is 0 (the butterflies of FFTs of size 2*4^L). Each access (req.en) advances the AGU.
// Reads return on rsp one cycle after the request; narrow reads give zero on
// lanes 1..3. Capacity is 4*DEPTH words.
//
// Bank structure, AGU and reordering crossbar follow the document; the lane
// address pattern of wide mode and the word-to-memory mapping are this
// design's own choices.
module mem_bank
  import bb_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned RW   = $clog2(DEPTH)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bank_cfg_t cfg,
  input  logic      cfg_load,
  input  bank_req_t req,
  output bank_rsp_t rsp
);

  logic            wide;
  logic [2:0]      lstride;
  logic            lhalf;
  logic [AW-1:0]   a;
  logic [AW-1:0]   lane_addr [LANES];
  logic [LANES-1:0] lane_en;
  logic [LANES-1:0] mem_en, mem_we;
  logic [RW-1:0]   mem_row   [LANES];
  cplx_t           mem_wdata [LANES];
  cplx_t           mem_rdata [LANES];

  agu u_agu (
    .clk, .rst_n, .cfg(cfg.agu), .load(cfg_load), .next(req.en), .addr(a)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wide    <= 1'b0;
      lstride <= '0;
      lhalf   <= 1'b0;
    end else if (cfg_load) begin
      wide    <= cfg.wide;
      lstride <= cfg.lstride;
      lhalf   <= cfg.lhalf;
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_addr[k] = a + AW'(k) * (AW'(1) << (2 * lstride + lhalf));
      lane_en[k]   = req.en && (wide || k == 0);
    end
  end

  reorder_xbar #(.DEPTH(DEPTH)) u_rx (
    .clk, .rst_n,
    .lane_en, .we(req.we), .lane_addr, .lane_wdata(req.wdata),
    .lane_rdata(rsp.rdata),
    .mem_en, .mem_we, .mem_row, .mem_wdata, .mem_rdata
  );

  for (genvar m = 0; m < LANES; m++) begin : g_mem
    spram #(.DEPTH(DEPTH), .WIDTH(2*DW)) u_ram (
      .clk, .en(mem_en[m]), .we(mem_we[m]), .addr(mem_row[m]),
      .wdata(mem_wdata[m]), .rdata(mem_rdata[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp.rvalid <= 1'b0;
    else        rsp.rvalid <= req.en && !req.we;
  end

endmodule
