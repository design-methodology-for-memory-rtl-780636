// mem_xbar: the memory crossbar switch between memory banks and units.
//
// Any of the NB banks can be connected to any of the NP unit ports. The
// controller writes owner[b], the port that bank b serves, before a task
// starts; at the end of a task it reconnects the banks (the output buffer of
// one unit becomes the input of the next), which replaces copying data between
// memories. A bank whose owner port is idle sees no access; a port that owns
// no bank reads zero. Requests and responses pass combinationally, so a unit
// sees the bank's one-cycle read latency unchanged. owner must not change
// while a read is in flight.
//
// The any-to-any connection follows the document; the owner encoding and the
// one-bank-per-port rule (asserted) are this design's.
module mem_xbar
  import bb_pkg::*;
#(
  parameter int unsigned NB = 4,
  parameter int unsigned NP = 6,
  localparam int unsigned PW = $clog2(NP)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PW-1:0]   owner    [NB],
  input  bank_req_t       port_req [NP],
  output bank_rsp_t       port_rsp [NP],
  output bank_req_t       bank_req [NB],
  input  bank_rsp_t       bank_rsp [NB]
);

  always_comb begin
    for (int b = 0; b < NB; b++)
      bank_req[b] = (int'(owner[b]) < NP) ? port_req[owner[b]] : '0;
    for (int p = 0; p < NP; p++) begin
      port_rsp[p] = '0;
      for (int b = NB-1; b >= 0; b--)
        if (int'(owner[b]) == p) port_rsp[p] = bank_rsp[b];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int a = 0; a < NB; a++)
        for (int b = a + 1; b < NB; b++)
          assert (!(owner[a] == owner[b] && int'(owner[a]) < NP
                    && port_req[owner[a]].en))
            else $error("mem_xbar: port %0d owns banks %0d and %0d", owner[a], a, b);
    end
  end

endmodule
