// cmac: four-lane complex multiply-accumulate SIMD unit with its own vector
// sequencer.
//
// A vector instruction (start with op, len, shift, conj_b, b_hold) makes the
// unit read len steps of four lanes from its source port A and its
// coefficient port B, process them at one step per cycle and write results
// through its destination port C, with no help from the controller: the banks'
// AGUs supply every address. Operations:
//   OP_BFLY4  radix-4 decimation-in-frequency butterfly: the DFT-4 of the four
//             A lanes, right-shifted by 'shift', each output lane k multiplied
//             by coefficient lane k (the twiddle; lane 0 holds 1.0). The
//             butterfly needs eleven accesses per cycle (4 reads, 3
//             twiddles, 4 writes); here the twiddle read is one wide access
//             of 4 lanes, made only on the steps where it changes.
//   OP_VMUL   y[k] = a[k] * b[k] (or conj(b[k])), e.g. channel compensation;
//             with narrow banks only lane 0 carries data, one point per cycle.
//   OP_BFLY2  two radix-2 butterflies, (a0+a2, a1+a3, a0-a2, a1-a3) on lanes
//             0..3, right-shifted by 'shift', no coefficient read: the last
//             stage of an FFT of size 2*4^L (e.g. 2048), read and written in
//             place with a lane spacing of N/4 = 2*4^(L-1).
//   OP_DOT    sum over steps and lanes of a[k] * b[k] (or conj): the result is
//             given at full precision on dot_re/dot_im and written once,
//             scaled and saturated, to lane 0 of C.
// Coefficients are Q2.14 (CSHIFT=14, so 1.0 is exact); products are rounded
// and saturated to 16 bits. B is read only every 2^b_hold steps and held in
// between, so one twiddle table serves every stage of a constant-geometry FFT.
//
// Timing: counting the cycle at whose end start is sampled as cycle 0, step i
// is read in cycle i+1 (data back in i+2, adds in i+3) and its result written
// in cycle i+4. Ports A and B only read, so their we and write-data fields
// are constant zero. done pulses with the last write (for OP_DOT, with its single
// result write) in cycle len+3. busy is high until done.
// That the unit is a multi-lane radix-4 complex MAC running vector
// instructions follows the document; the pipeline, number formats, operation
// encoding and coefficient hold are this design's.
module cmac
  import bb_pkg::*;
#(
  parameter int unsigned CSHIFT = 14,
  localparam int unsigned ACCW  = 48
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  cmac_op_e               op,
  input  logic [15:0]            len,
  input  logic [1:0]             shift,
  input  logic                   conj_b,
  input  logic [3:0]             b_hold,
  output logic                   busy,
  output logic                   done,
  output logic signed [ACCW-1:0] dot_re,
  output logic signed [ACCW-1:0] dot_im,
  output bank_req_t              a_req,
  input  bank_rsp_t              a_rsp,
  output bank_req_t              b_req,
  input  bank_rsp_t              b_rsp,
  output bank_req_t              c_req
);

  // ---------------- instruction registers and issue ----------------
  cmac_op_e    op_q;
  logic [15:0] len_q, icnt;
  logic [1:0]  shift_q;
  logic        conj_q;
  logic [3:0]  hold_q;
  logic        issuing;
  logic        last_rd;     // the read issued last cycle was the final one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_BFLY4; len_q <= '0; shift_q <= '0; conj_q <= 1'b0; hold_q <= '0;
      issuing <= 1'b0; icnt <= '0; busy <= 1'b0; last_rd <= 1'b0;
    end else begin
      last_rd <= issuing && (icnt == len_q - 16'd1);
      if (start && !busy) begin
        op_q <= op; len_q <= len; shift_q <= shift; conj_q <= conj_b; hold_q <= b_hold;
        issuing <= (len != 16'd0);
        busy    <= (len != 16'd0);
        icnt    <= '0;
      end else begin
        if (issuing) begin
          icnt <= icnt + 16'd1;
          if (icnt == len_q - 16'd1) issuing <= 1'b0;
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  always_comb begin
    a_req = '0;
    b_req = '0;
    a_req.en = issuing;
    b_req.en = issuing && op_q != OP_BFLY2 && ((icnt & ((16'd1 << hold_q) - 16'd1)) == 16'd0);
  end

  // ---------------- stage 1: butterfly adds ----------------
  lanes_t b_lat, b_cur;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            b_lat <= '0;
    else if (b_rsp.rvalid) b_lat <= b_rsp.rdata;
  end
  assign b_cur = b_rsp.rvalid ? b_rsp.rdata : b_lat;

  lanes_t x;
  logic signed [DW+1:0] fr [LANES];
  logic signed [DW+1:0] fi [LANES];

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      fr[k] = '0;
      fi[k] = '0;
    end
    x = a_rsp.rdata;
    if (op_q == OP_BFLY4) begin
      fr[0] = 18'(x[0].re) + 18'(x[1].re) + 18'(x[2].re) + 18'(x[3].re);
      fi[0] = 18'(x[0].im) + 18'(x[1].im) + 18'(x[2].im) + 18'(x[3].im);
      fr[1] = 18'(x[0].re) + 18'(x[1].im) - 18'(x[2].re) - 18'(x[3].im);
      fi[1] = 18'(x[0].im) - 18'(x[1].re) - 18'(x[2].im) + 18'(x[3].re);
      fr[2] = 18'(x[0].re) - 18'(x[1].re) + 18'(x[2].re) - 18'(x[3].re);
      fi[2] = 18'(x[0].im) - 18'(x[1].im) + 18'(x[2].im) - 18'(x[3].im);
      fr[3] = 18'(x[0].re) - 18'(x[1].im) - 18'(x[2].re) + 18'(x[3].im);
      fi[3] = 18'(x[0].im) + 18'(x[1].re) - 18'(x[2].im) - 18'(x[3].re);
      for (int k = 0; k < LANES; k++) begin
        fr[k] = fr[k] >>> shift_q;
        fi[k] = fi[k] >>> shift_q;
      end
    end else if (op_q == OP_BFLY2) begin
      for (int k = 0; k < 2; k++) begin
        fr[k]   = 18'(x[k].re) + 18'(x[k+2].re);
        fi[k]   = 18'(x[k].im) + 18'(x[k+2].im);
        fr[k+2] = 18'(x[k].re) - 18'(x[k+2].re);
        fi[k+2] = 18'(x[k].im) - 18'(x[k+2].im);
      end
      for (int k = 0; k < LANES; k++) begin
        fr[k] = fr[k] >>> shift_q;
        fi[k] = fi[k] >>> shift_q;
      end
    end else begin
      for (int k = 0; k < LANES; k++) begin
        fr[k] = 18'(x[k].re);
        fi[k] = 18'(x[k].im);
      end
    end
  end

  lanes_t s1_x, s1_b;
  logic   s1_v, s1_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_x <= '0; s1_b <= '0; s1_v <= 1'b0; s1_last <= 1'b0;
    end else begin
      s1_v    <= a_rsp.rvalid;
      s1_last <= a_rsp.rvalid && last_rd;
      if (a_rsp.rvalid) begin
        for (int k = 0; k < LANES; k++) begin
          s1_x[k].re <= sat16(48'(fr[k]));
          s1_x[k].im <= sat16(48'(fi[k]));
          if (op_q == OP_BFLY2) begin
            s1_b[k].re <= DW'(1 << CSHIFT);   // no twiddle: times 1.0
            s1_b[k].im <= '0;
          end else begin
            s1_b[k].re <= b_cur[k].re;
            s1_b[k].im <= conj_q ? sat16(-48'(b_cur[k].im)) : b_cur[k].im;
          end
        end
      end
    end
  end

  // ---------------- stage 2: complex multiplies ----------------
  logic signed [2*DW:0] pr [LANES];
  logic signed [2*DW:0] pi [LANES];
  logic signed [ACCW-1:0] sum_r, sum_i;
  localparam logic signed [ACCW-1:0] RND = ACCW'(1) <<< (CSHIFT - 1);

  always_comb begin
    sum_r = '0;
    sum_i = '0;
    for (int k = 0; k < LANES; k++) begin
      pr[k] = 33'(s1_x[k].re * s1_b[k].re) - 33'(s1_x[k].im * s1_b[k].im);
      pi[k] = 33'(s1_x[k].re * s1_b[k].im) + 33'(s1_x[k].im * s1_b[k].re);
      sum_r = sum_r + ACCW'(pr[k]);
      sum_i = sum_i + ACCW'(pi[k]);
    end
  end

  lanes_t s2_y;
  logic   s2_v, s2_last, dot_wr;
  logic signed [ACCW-1:0] acc_r, acc_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_y <= '0; s2_v <= 1'b0; s2_last <= 1'b0; dot_wr <= 1'b0;
      acc_r <= '0; acc_i <= '0;
    end else begin
      s2_v    <= s1_v && op_q != OP_DOT;
      s2_last <= s1_last;
      dot_wr  <= s1_last && op_q == OP_DOT;
      if (start && !busy) begin
        acc_r <= '0;
        acc_i <= '0;
      end else if (s1_v && op_q == OP_DOT) begin
        acc_r <= acc_r + sum_r;
        acc_i <= acc_i + sum_i;
      end
      if (s1_v) begin
        for (int k = 0; k < LANES; k++) begin
          s2_y[k].re <= sat16((48'(pr[k]) + RND) >>> CSHIFT);
          s2_y[k].im <= sat16((48'(pi[k]) + RND) >>> CSHIFT);
        end
      end
    end
  end

  assign dot_re = acc_r;
  assign dot_im = acc_i;

  always_comb begin
    c_req = '0;
    if (dot_wr) begin
      c_req.en          = 1'b1;
      c_req.we          = 1'b1;
      c_req.wdata[0].re = sat16((acc_r + RND) >>> CSHIFT);
      c_req.wdata[0].im = sat16((acc_i + RND) >>> CSHIFT);
    end else if (s2_v) begin
      c_req.en    = 1'b1;
      c_req.we    = 1'b1;
      c_req.wdata = s2_y;
    end
  end

  assign done = (s2_last && op_q != OP_DOT) || dot_wr;

endmodule
