// mapper_demapper: constellation mapping and de-mapping accelerator.
//
// Map (mode=0): each valid bits_in word carries LANES symbols of up to 6 bits
// (symbol k in bits [6k+5:6k], of which the low 2, 4 or 6 bits are used for
// QPSK, 16-QAM or 64-QAM); the unit writes the LANES constellation points in
// one wide write to the bank it owns, in the cycle after bits_in_valid.
// Demap (mode=1): start/len make the unit read len wide words (4 points each)
// from its bank, one per cycle, and return the hard-decision bits in the same
// packing on bits_out one cycle after each read returns; done pulses with the
// last word. A 256-point symbol is de-mapped in 64 cycles plus 2 of latency.
// Each axis carries half the bits of a symbol (upper half on the real axis),
// Gray coded: index i = gray-to-binary(bits) selects the level
// (2i - (M-1)) * scale, M = 2, 4 or 8 levels per axis. De-mapping counts the
// decision thresholds (2j - M) * scale, j = 1..M-1, that the value exceeds.
// The document names mapping/de-mapping as an accelerator and costs de-mapping
// at 4 accesses per cycle; the Gray mapping, hard decisions and packing are
// this design's.
module mapper_demapper
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode,
  input  modu_e       modu,
  input  logic [15:0] scale,
  input  logic        bits_in_valid,
  input  logic [6*LANES-1:0] bits_in,
  input  logic        start,
  input  logic [15:0] len,
  output logic        busy,
  output logic        done,
  output logic        bits_out_valid,
  output logic [6*LANES-1:0] bits_out,
  output bank_req_t   req,
  input  bank_rsp_t   rsp
);

  function automatic int bits_per_axis(modu_e m);
    case (m)
      MOD_QPSK:  return 1;
      MOD_QAM16: return 2;
      default:   return 3;
    endcase
  endfunction

  function automatic logic signed [DW-1:0] level(logic [2:0] g, int m, logic [15:0] sc);
    logic [2:0] idx;
    int nl, lv;
    logic [2:0] gm;
    gm  = g & 3'((1 << m) - 1);
    idx = gm;
    for (int i = 1; i < 3; i++) idx = idx ^ (gm >> i);
    nl  = 1 << m;
    lv  = 2 * int'(idx) - nl + 1;
    return sat16(48'(lv) * 48'(signed'({1'b0, sc})));
  endfunction

  function automatic logic [2:0] decide(logic signed [DW-1:0] x, int m, logic [15:0] sc);
    logic [2:0] idx;
    int nl;
    nl  = 1 << m;
    idx = '0;
    for (int j = 1; j < 8; j++)
      if (j < nl && 48'(x) > 48'(2 * j - nl) * 48'(signed'({1'b0, sc})))
        idx = idx + 3'd1;
    return idx ^ (idx >> 1);
  endfunction

  int m;
  assign m = bits_per_axis(modu);

  // ---------------- map ----------------
  lanes_t pts;
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      logic [5:0] sb;
      sb = bits_in[6*k +: 6];
      pts[k].re = level(3'(sb >> m), m, scale);
      pts[k].im = level(sb[2:0] & 3'((1 << m) - 1), m, scale);
    end
  end

  logic   map_v;
  lanes_t map_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_v <= 1'b0;
      map_q <= '0;
    end else begin
      map_v <= bits_in_valid && !mode;
      if (bits_in_valid) map_q <= pts;
    end
  end

  // ---------------- demap ----------------
  logic [15:0] cnt, len_q;
  logic        issuing, last_rd, last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; len_q <= '0; issuing <= 1'b0; busy <= 1'b0;
      last_rd <= 1'b0; last_q <= 1'b0;
    end else begin
      last_rd <= issuing && (cnt == len_q - 16'd1);
      last_q  <= rsp.rvalid && last_rd;
      if (start && !busy && mode && len != 16'd0) begin
        len_q <= len; cnt <= '0; issuing <= 1'b1; busy <= 1'b1;
      end else begin
        if (issuing) begin
          cnt <= cnt + 16'd1;
          if (cnt == len_q - 16'd1) issuing <= 1'b0;
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  logic [6*LANES-1:0] dbits;
  always_comb begin
    dbits = '0;
    for (int k = 0; k < LANES; k++) begin
      logic [2:0] gi, gq;
      gi = decide(rsp.rdata[k].re, m, scale);
      gq = decide(rsp.rdata[k].im, m, scale);
      dbits[6*k +: 6] = 6'((6'(gi) << m) | 6'(gq));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_out_valid <= 1'b0;
      bits_out       <= '0;
    end else begin
      bits_out_valid <= rsp.rvalid && mode;
      if (rsp.rvalid) bits_out <= dbits;
    end
  end

  assign done = last_q;

  always_comb begin
    req = '0;
    if (map_v) begin
      req.en    = 1'b1;
      req.we    = 1'b1;
      req.wdata = map_q;
    end else if (issuing) begin
      req.en = 1'b1;
    end
  end

endmodule
