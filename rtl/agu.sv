// agu: address generator unit of one memory bank.
//
// The controller writes a configuration and pulses load; from then on the unit
// runs by itself during a vector instruction, presenting the address of the
// current access on addr and moving to the next one each cycle next is high.
// Three modes, as the bank's AGU offers them:
//   normal      addr = start + i*step
//   modulo      a pointer starting at start, advanced by step and kept inside
//               the circular buffer [base, base+len) (|step| < len)
//   bit-reversed addr = base + reverse(i), the low rbits bits of the count i
//               reversed either bit by bit or, with rdig2, in base-4 digits
//               (the output order of a radix-4 FFT; rbits then even)
// The three modes follow the document; the formulas, the fields of agu_cfg_t
// and the base-4 digit option are this design's. addr is valid in the cycle
// after load and changes in the cycle after each next.
module agu
  import bb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  agu_cfg_t      cfg,
  input  logic          load,
  input  logic          next,
  output logic [AW-1:0] addr
);

  agu_cfg_t      c;
  logic [AW-1:0] ptr;   // normal / modulo pointer
  logic [AW-1:0] cnt;   // access count for bit-reversed mode
  logic [AW-1:0] rev;
  logic [AW-1:0] nxt;
  logic [AW:0]   lim;

  always_comb begin
    rev = '0;
    for (int i = 0; i < AW; i++) begin
      if (i < int'(c.rbits)) begin
        if (c.rdig2) rev[int'(c.rbits) - 2 - (i & ~1) + (i & 1)] = cnt[i];
        else         rev[int'(c.rbits) - 1 - i]                  = cnt[i];
      end
    end
  end

  // Next pointer, wrapped into the circular buffer in modulo mode.
  always_comb begin
    nxt = ptr + c.step;
    lim = {1'b0, c.base} + {1'b0, c.len};
    if (c.mode == AGU_MODULO) begin
      if (!c.step[AW-1] && {1'b0, nxt} >= lim) nxt = nxt - c.len;
      else if (c.step[AW-1] && nxt < c.base)    nxt = nxt + c.len;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c   <= '0;
      ptr <= '0;
      cnt <= '0;
    end else if (load) begin
      c   <= cfg;
      ptr <= cfg.start;
      cnt <= '0;
    end else if (next) begin
      ptr <= nxt;
      cnt <= cnt + 1'b1;
    end
  end

  assign addr = (c.mode == AGU_BITREV) ? c.base + rev : ptr;

endmodule
