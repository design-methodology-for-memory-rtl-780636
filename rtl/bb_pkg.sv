// bb_pkg: types and constants shared by the baseband processor.
//
// Data words are complex samples of 16-bit two's-complement real and imaginary
// parts packed into 32 bits (the 32-bit memory words of the banks). A memory
// bank port carries four such lanes, one per parallel memory of a 4-way bank.
// The request/response structs below are the bundle that every unit drives
// towards the memory crossbar; the configuration structs are what the
// controller core writes before it issues a vector instruction.
package bb_pkg;

  localparam int unsigned LANES = 4;   // parallel memories per bank, lanes per unit
  localparam int unsigned DW    = 16;  // bits per real/imaginary part
  localparam int unsigned AW    = 16;  // address width used by every AGU

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef cplx_t [LANES-1:0] lanes_t;

  // Memory banks and crossbar ports of the processor.
  localparam int unsigned NBANK = 4;
  localparam int unsigned NPORT = 6;
  localparam int unsigned BANK_DM0 = 0;  // incoming symbols
  localparam int unsigned BANK_DM1 = 1;  // source of calculations
  localparam int unsigned BANK_DM2 = 2;  // destination of calculations
  localparam int unsigned BANK_CM  = 3;  // coefficients and constant vectors
  localparam int unsigned PORT_FE  = 0;  // front-end accelerators (writes)
  localparam int unsigned PORT_CA  = 1;  // CMAC source operand
  localparam int unsigned PORT_CB  = 2;  // CMAC coefficient operand
  localparam int unsigned PORT_CC  = 3;  // CMAC destination
  localparam int unsigned PORT_MDM = 4;  // mapper/demapper
  localparam int unsigned PORT_EXT = 5;  // controller / network bridge

  // One access of a unit to the bank it owns through the crossbar.
  typedef struct packed {
    logic   en;     // access this cycle (advances the bank's AGU)
    logic   we;     // write when set, read otherwise
    lanes_t wdata;  // lane 0 only in narrow mode
  } bank_req_t;

  typedef struct packed {
    logic   rvalid; // read data of the access issued one cycle earlier
    lanes_t rdata;
  } bank_rsp_t;

  typedef enum logic [1:0] {
    AGU_NORMAL = 2'd0,  // start, start+step, start+2*step, ...
    AGU_BITREV = 2'd1,  // base + digit-reversed count
    AGU_MODULO = 2'd2   // circular buffer [base, base+len)
  } agu_mode_e;

  typedef struct packed {
    agu_mode_e         mode;
    logic [AW-1:0]     start;  // first address (normal, modulo)
    logic [AW-1:0]     step;   // increment, two's complement
    logic [AW-1:0]     base;   // buffer base (modulo, bit-reversed)
    logic [AW-1:0]     len;    // buffer length (modulo)
    logic [4:0]        rbits;  // number of address bits reversed (bit-reversed)
    logic              rdig2;  // reverse base-4 digits instead of bits
  } agu_cfg_t;

  typedef struct packed {
    agu_cfg_t   agu;
    logic       wide;     // 1: four lanes per access, 0: lane 0 only
    logic [2:0] lstride;  // wide mode: lane k addresses A + k*4^lstride
    logic       lhalf;    // wide mode: lane spacing doubled to 2*4^lstride
  } bank_cfg_t;

  typedef enum logic [1:0] {
    OP_BFLY4 = 2'd0,  // radix-4 DIF butterfly, outputs times coefficients
    OP_VMUL  = 2'd1,  // lane-wise complex multiply
    OP_DOT   = 2'd2,  // complex dot product over all lanes and steps
    OP_BFLY2 = 2'd3   // two radix-2 butterflies, lanes (0,2) and (1,3)
  } cmac_op_e;

  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_QAM16 = 2'd1,
    MOD_QAM64 = 2'd2
  } modu_e;

  // Front-end accelerator settings.
  typedef struct packed {
    logic [31:0] phase_inc;  // NCO increment of the frequency compensation
    logic        bypass;     // skip the decimation filter
    logic [1:0]  decim;      // decimate by 2^decim
    logic [7:0]  thr;        // detection threshold, sixteenths
    logic [31:0] pmin;       // minimum window power for a detection
    logic        capture;    // write samples into the owned bank
    logic        trig;       // hold capture until a packet is detected
    logic [15:0] cap_len;    // samples written per capture
  } fe_cfg_t;

  // Saturate a wider signed value to DW bits.
  function automatic logic signed [DW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

  // Sum of the base-4 digits of a word address, modulo 4: the memory of a
  // 4-way bank that holds the word.
  function automatic logic [1:0] mem_of(input logic [AW-1:0] a);
    logic [1:0] s;
    s = '0;
    for (int d = 0; d < AW/2; d++) s = s + a[2*d +: 2];
    return s;
  endfunction

endpackage
