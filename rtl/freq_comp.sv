// freq_comp: frequency error compensation accelerator.
//
// Multiplies the sample stream by exp(j*phi[n]), phi advancing by phase_inc
// per sample (a numerically controlled oscillator, 2^32 = one turn), which
// removes a carrier frequency offset once the controller has written the
// negated offset estimate. The rotation is a pipelined CORDIC: a quarter-turn
// pre-rotation brings the angle into [-45, 45) degrees, STAGES micro-rotations
// follow, and a final multiply by 1/K (K = CORDIC gain) restores the level.
// Angles use 24 bits (2^24 = one turn); the datapath carries four extra
// fraction bits. Results are rounded and saturated to 16 bits.
//
// Interface: in_valid/in_data in, out_valid/out_data out, STAGES+2 cycles
// later, one sample per cycle at most. clear restarts the phase at zero.
// The document names this accelerator only; the NCO-plus-CORDIC structure is
// this design's.
module freq_comp
  import bb_pkg::*;
#(
  parameter int unsigned STAGES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [31:0] phase_inc,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data
);

  localparam int IW = 23;   // internal width, 4 fraction bits
  localparam int ZW = 25;   // angle width, 2^24 = one turn
  // atan(2^-i) in units of 2^-24 turn
  localparam int ATAN [16] = '{2097152, 1238021, 654136, 332050, 166669, 83416,
                               41718, 20860, 10430, 5215, 2608, 1304, 652, 326,
                               163, 81};
  localparam logic signed [17:0] KINV = 18'sd19898;   // 2^15 / K

  logic [31:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase <= '0;
    else if (clear)    phase <= '0;
    else if (in_valid) phase <= phase + phase_inc;
  end

  // Pre-rotation by a multiple of 90 degrees.
  logic [23:0]          ang;
  logic [1:0]           quad;
  logic signed [ZW-1:0] zres;
  logic signed [IW-1:0] xi, yi, xp, yp;
  always_comb begin
    ang  = phase[31:8];
    quad = 2'((ang + 24'd2097152) >> 22);
    zres = ZW'(signed'({1'b0, ang})) - ZW'(signed'({1'b0, quad, 22'd0}));
    if (zres > ZW'(24'sh7fffff)) zres = zres - ZW'(25'sh1000000);
    xi = IW'(in_data.re) <<< 4;
    yi = IW'(in_data.im) <<< 4;
    case (quad)
      2'd0: begin xp = xi;  yp = yi;  end
      2'd1: begin xp = -yi; yp = xi;  end
      2'd2: begin xp = -xi; yp = -yi; end
      default: begin xp = yi; yp = -xi; end
    endcase
  end

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  logic signed [ZW-1:0] zs [STAGES+1];
  logic [STAGES:0]      vs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs <= '0;
      for (int i = 0; i <= STAGES; i++) begin
        xs[i] <= '0; ys[i] <= '0; zs[i] <= '0;
      end
    end else begin
      vs[0] <= in_valid;
      xs[0] <= xp;
      ys[0] <= yp;
      zs[0] <= zres;
      for (int i = 0; i < STAGES; i++) begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ZW'(ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ZW'(ATAN[i]);
        end
      end
    end
  end

  // Gain correction: value * KINV / 2^15, minus the 4 fraction bits.
  logic signed [47:0] gx, gy;
  always_comb begin
    gx = (48'(xs[STAGES]) * 48'(KINV) + 48'sd262144) >>> 19;
    gy = (48'(ys[STAGES]) * 48'(KINV) + 48'sd262144) >>> 19;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid   <= vs[STAGES];
      out_data.re <= sat16(gx);
      out_data.im <= sat16(gy);
    end
  end

endmodule
