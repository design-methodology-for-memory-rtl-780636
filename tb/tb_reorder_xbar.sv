// tb_reorder_xbar: connects the reordering crossbar to four memory models
// kept here, writes words through random single lanes and through four-lane
// accesses at A + k*4^e, and checks that every word lands in memory
// (digit sum of its address mod 4) at row address/4, that wide reads return
// each lane its own word one cycle later, and that idle lanes read zero.
module tb_reorder_xbar;
  import bb_pkg::*;
  localparam int DEPTH = 256;
  localparam int RW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic [LANES-1:0] lane_en = '0;
  logic we = 0;
  logic [AW-1:0] lane_addr [LANES];
  lanes_t lane_wdata, lane_rdata;
  logic [LANES-1:0] mem_en, mem_we;
  logic [RW-1:0] mem_row [LANES];
  cplx_t mem_wdata [LANES];
  cplx_t mem_rdata [LANES];
  cplx_t model [LANES][DEPTH];
  int checks = 0, failures = 0;

  reorder_xbar #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // four single-port memory models
  always_ff @(posedge clk)
    for (int m = 0; m < LANES; m++)
      if (mem_en[m]) begin
        if (mem_we[m]) model[m][mem_row[m]] <= mem_wdata[m];
        else           mem_rdata[m] <= model[m][mem_row[m]];
      end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dsum(int a);
    int s = 0;
    for (int d = 0; d < 8; d++) s += (a >> (2 * d)) & 3;
    return s % 4;
  endfunction

  function automatic cplx_t pat(int a);
    cplx_t c;
    c.re = 16'(a * 7 + 3);
    c.im = 16'(-a);
    return c;
  endfunction

  initial begin
    for (int m = 0; m < LANES; m++) begin
      mem_rdata[m] = '0;
      for (int r = 0; r < DEPTH; r++) model[m][r] = '0;
    end
    for (int k = 0; k < LANES; k++) lane_addr[k] = '0;
    lane_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // single-lane writes of every word, through a random lane
    for (int a = 0; a < 4 * DEPTH; a++) begin
      int k;
      k = $urandom_range(0, 3);
      lane_en = '0; lane_en[k] = 1'b1; we = 1;
      lane_addr[k] = AW'(a); lane_wdata[k] = pat(a);
      @(negedge clk);
    end
    lane_en = '0; we = 0;
    @(negedge clk);
    for (int a = 0; a < 4 * DEPTH; a++) begin
      checks++;
      if (model[dsum(a)][a / 4] !== pat(a)) begin
        failures++;
        if (failures < 10) $display("word %0d not in memory %0d row %0d", a, dsum(a), a / 4);
      end
    end
    // wide reads at strides 4^e
    for (int e = 0; e < 4; e++) begin
      for (int n = 0; n < 64; n++) begin
        int base, s;
        s = 1 << (2 * e);
        base = $urandom_range(0, 4 * DEPTH - 1);
        base = base & ~(3 * s);                  // digit e of the base is 0
        if (base + 3 * s >= 4 * DEPTH) base = base % s;
        lane_en = '1; we = 0;
        for (int k = 0; k < LANES; k++) lane_addr[k] = AW'(base + k * s);
        @(negedge clk);
        lane_en = '0;
        for (int k = 0; k < LANES; k++) begin
          checks++;
          if (lane_rdata[k] !== pat(base + k * s)) begin
            failures++;
            if (failures < 10) $display("e=%0d base=%0d lane %0d wrong", e, base, k);
          end
        end
      end
    end
    // partial read: only lane 2 active, others must read zero
    lane_en = 4'b0100; lane_addr[2] = AW'(77);
    @(negedge clk);
    lane_en = '0;
    checks++;
    if (lane_rdata[2] !== pat(77) || lane_rdata[0] !== '0 || lane_rdata[1] !== '0
        || lane_rdata[3] !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
