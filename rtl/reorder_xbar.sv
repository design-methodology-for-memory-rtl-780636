// reorder_xbar: the reordering crossbar inside a 4-way memory bank.
//
// Each of the LANES ports of the bank presents a word address; the word lives
// in memory mem_of(addr) (sum of the base-4 digits of the address, mod 4) at
// row addr/4. The crossbar sends every active lane to the memory holding its
// word, so one port can reach all memories (single-port devices such as the
// front end) and four lanes can be served in the same cycle (wide accesses).
// Read data come back from the memories one cycle later and are routed to the
// lanes that asked for them; inactive lanes read zero.
//
// That a reordering crossbar lets any memory be reached from any port follows
// the document; the digit-sum mapping is this design's choice, made so that
// four addresses A + k*4^e (digit e of A zero) never share a memory, nor do
// A + k*2*4^e (digit e of A 0 or 1, digit e+1 zero). Two active
// lanes on the same memory is a usage error, caught by an assertion.
module reorder_xbar
  import bb_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned RW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // bank side
  input  logic [LANES-1:0]    lane_en,
  input  logic                we,
  input  logic [AW-1:0]       lane_addr [LANES],
  input  lanes_t              lane_wdata,
  output lanes_t              lane_rdata,
  // memory side
  output logic [LANES-1:0]    mem_en,
  output logic [LANES-1:0]    mem_we,
  output logic [RW-1:0]       mem_row   [LANES],
  output cplx_t               mem_wdata [LANES],
  input  cplx_t               mem_rdata [LANES]
);

  logic [1:0] lane_mem [LANES];
  logic [1:0] rd_src   [LANES];   // memory each lane reads from, last cycle
  logic [LANES-1:0] rd_act;

  always_comb begin
    for (int k = 0; k < LANES; k++) lane_mem[k] = mem_of(lane_addr[k]);
    for (int m = 0; m < LANES; m++) begin
      mem_en[m]    = 1'b0;
      mem_we[m]    = 1'b0;
      mem_row[m]   = '0;
      mem_wdata[m] = '0;
      for (int k = LANES-1; k >= 0; k--) begin
        if (lane_en[k] && lane_mem[k] == 2'(m)) begin
          mem_en[m]    = 1'b1;
          mem_we[m]    = we;
          mem_row[m]   = lane_addr[k][RW+1:2];
          mem_wdata[m] = lane_wdata[k];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= '0;
      for (int k = 0; k < LANES; k++) rd_src[k] <= '0;
    end else begin
      rd_act <= lane_en & {LANES{~we}};
      for (int k = 0; k < LANES; k++) rd_src[k] <= lane_mem[k];
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++)
      lane_rdata[k] = rd_act[k] ? mem_rdata[rd_src[k]] : '0;
  end

  // Every memory serves at most one lane per cycle.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int a = 0; a < LANES; a++)
        for (int b = a + 1; b < LANES; b++)
          assert (!(lane_en[a] && lane_en[b] && lane_mem[a] == lane_mem[b]))
            else $error("reorder_xbar: lanes %0d and %0d hit memory %0d", a, b, lane_mem[a]);
    end
  end

endmodule
