// bb_top: memory-centric multi-standard OFDM baseband processor.
//
// Four memory banks (DM0, DM1, DM2 and the coefficient memory CM), each
// made of four parallel single-port memories with its own AGU, are joined by
// the memory crossbar to the units: the front-end accelerators (frequency
// compensation, filtering/decimation, packet detection), the four-lane
// radix-4 complex MAC unit (three ports: source, coefficients, destination),
// the mapper/demapper, and an external port for the controller core and the
// bridge to the scalar part. Data are never copied between memories: when a
// task ends the controller reconnects the banks, so the buffer a unit has
// written becomes the input of the next unit. In the scheduling the design is
// built for, DM0 receives the incoming symbol while the CMAC works from DM1
// into DM2, CM holds twiddles and channel coefficients, and DM0/DM1 swap roles
// every symbol.
//
// The controller core itself is not part of this RTL: everything it would set
// (bank configurations and load strobes, bank owners, vector instructions of
// the CMAC and the mapper/demapper, front-end settings) is a top-level input,
// and its data access is the ext_req/ext_rsp port. Bank sizes default to the
// 2048x32 (DM0, DM1, CM) and 1024x32 (DM2) memories per way, 28672 words in
// all. Port and bank numbering are given in bb_pkg.
module bb_top
  import bb_pkg::*;
#(
  parameter int unsigned DM0_DEPTH = 2048,
  parameter int unsigned DM1_DEPTH = 2048,
  parameter int unsigned DM2_DEPTH = 1024,
  parameter int unsigned CM_DEPTH  = 2048
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // bank configuration and crossbar setting
  input  bank_cfg_t              bank_cfg      [NBANK],
  input  logic [NBANK-1:0]       bank_cfg_load,
  input  logic [2:0]             xbar_owner    [NBANK],
  // controller / network bridge data port
  input  bank_req_t              ext_req,
  output bank_rsp_t              ext_rsp,
  // analog front-end samples and front-end accelerators
  input  logic                   adc_valid,
  input  cplx_t                  adc_data,
  input  fe_cfg_t                fe_cfg,
  input  logic                   fe_clear,
  output logic                   pkt_det,
  output logic [15:0]            fe_captured,
  output logic                   fe_cap_done,
  output logic signed [47:0]     fe_det_corr_re,
  output logic signed [47:0]     fe_det_corr_im,
  // CMAC vector instructions
  input  logic                   cmac_start,
  input  cmac_op_e               cmac_op,
  input  logic [15:0]            cmac_len,
  input  logic [1:0]             cmac_shift,
  input  logic                   cmac_conj,
  input  logic [3:0]             cmac_bhold,
  output logic                   cmac_busy,
  output logic                   cmac_done,
  output logic signed [47:0]     cmac_dot_re,
  output logic signed [47:0]     cmac_dot_im,
  // mapper/demapper
  input  logic                   mdm_mode,
  input  modu_e                  mdm_modu,
  input  logic [15:0]            mdm_scale,
  input  logic                   mdm_bits_in_valid,
  input  logic [6*LANES-1:0]     mdm_bits_in,
  input  logic                   mdm_start,
  input  logic [15:0]            mdm_len,
  output logic                   mdm_busy,
  output logic                   mdm_done,
  output logic                   mdm_bits_out_valid,
  output logic [6*LANES-1:0]     mdm_bits_out
);

  bank_req_t port_req [NPORT];
  bank_rsp_t port_rsp [NPORT];
  bank_req_t bank_req [NBANK];
  bank_rsp_t bank_rsp [NBANK];

  mem_xbar #(.NB(NBANK), .NP(NPORT)) u_xbar (
    .clk, .rst_n, .owner(xbar_owner),
    .port_req, .port_rsp, .bank_req, .bank_rsp
  );

  mem_bank #(.DEPTH(DM0_DEPTH)) u_dm0 (
    .clk, .rst_n, .cfg(bank_cfg[BANK_DM0]), .cfg_load(bank_cfg_load[BANK_DM0]),
    .req(bank_req[BANK_DM0]), .rsp(bank_rsp[BANK_DM0])
  );
  mem_bank #(.DEPTH(DM1_DEPTH)) u_dm1 (
    .clk, .rst_n, .cfg(bank_cfg[BANK_DM1]), .cfg_load(bank_cfg_load[BANK_DM1]),
    .req(bank_req[BANK_DM1]), .rsp(bank_rsp[BANK_DM1])
  );
  mem_bank #(.DEPTH(DM2_DEPTH)) u_dm2 (
    .clk, .rst_n, .cfg(bank_cfg[BANK_DM2]), .cfg_load(bank_cfg_load[BANK_DM2]),
    .req(bank_req[BANK_DM2]), .rsp(bank_rsp[BANK_DM2])
  );
  mem_bank #(.DEPTH(CM_DEPTH)) u_cm (
    .clk, .rst_n, .cfg(bank_cfg[BANK_CM]), .cfg_load(bank_cfg_load[BANK_CM]),
    .req(bank_req[BANK_CM]), .rsp(bank_rsp[BANK_CM])
  );

  front_end u_fe (
    .clk, .rst_n, .cfg(fe_cfg), .clear(fe_clear),
    .adc_valid, .adc_data,
    .req(port_req[PORT_FE]),
    .pkt_det, .captured(fe_captured), .cap_done(fe_cap_done),
    .det_corr_re(fe_det_corr_re), .det_corr_im(fe_det_corr_im)
  );

  cmac u_cmac (
    .clk, .rst_n,
    .start(cmac_start), .op(cmac_op), .len(cmac_len), .shift(cmac_shift),
    .conj_b(cmac_conj), .b_hold(cmac_bhold),
    .busy(cmac_busy), .done(cmac_done), .dot_re(cmac_dot_re), .dot_im(cmac_dot_im),
    .a_req(port_req[PORT_CA]), .a_rsp(port_rsp[PORT_CA]),
    .b_req(port_req[PORT_CB]), .b_rsp(port_rsp[PORT_CB]),
    .c_req(port_req[PORT_CC])
  );

  mapper_demapper u_mdm (
    .clk, .rst_n,
    .mode(mdm_mode), .modu(mdm_modu), .scale(mdm_scale),
    .bits_in_valid(mdm_bits_in_valid), .bits_in(mdm_bits_in),
    .start(mdm_start), .len(mdm_len),
    .busy(mdm_busy), .done(mdm_done),
    .bits_out_valid(mdm_bits_out_valid), .bits_out(mdm_bits_out),
    .req(port_req[PORT_MDM]), .rsp(port_rsp[PORT_MDM])
  );

  assign port_req[PORT_EXT] = ext_req;
  assign ext_rsp            = port_rsp[PORT_EXT];

endmodule
