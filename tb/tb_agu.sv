// tb_agu: runs the address generator in each mode and compares its address
// sequence with sequences computed here: linear with positive and negative
// steps, circular buffers with wrap-around in both directions, bit reversal
// and base-4 digit reversal.
module tb_agu;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, next = 0;
  agu_cfg_t cfg;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev_bits(int v, int n);
    int r = 0;
    for (int i = 0; i < n; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic int rev_dig(int v, int n);
    int r = 0;
    for (int i = 0; i < n / 2; i++) r = (r << 2) | ((v >> (2 * i)) & 3);
    return r;
  endfunction

  task automatic run(agu_cfg_t c, int n, string name);
    int p, expv;
    cfg = c;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; next = 1;
    p = int'(c.start);
    for (int i = 0; i < n; i++) begin
      case (c.mode)
        AGU_NORMAL: expv = (int'(c.start) + i * int'($signed(c.step))) & 16'hffff;
        AGU_MODULO: expv = p;
        default:    expv = int'(c.base) + (c.rdig2 ? rev_dig(i, int'(c.rbits))
                                                   : rev_bits(i, int'(c.rbits)));
      endcase
      checks++;
      if (int'(addr) != expv) begin
        failures++;
        $display("%s step %0d: addr %0d want %0d", name, i, addr, expv);
      end
      p = p + int'($signed(c.step));
      if (p >= int'(c.base) + int'(c.len)) p -= int'(c.len);
      if (p < int'(c.base)) p += int'(c.len);
      @(negedge clk);
    end
    next = 0;
    // address must hold without next
    expv = int'(addr);
    @(negedge clk);
    checks++;
    if (int'(addr) != expv) failures++;
  endtask

  initial begin
    agu_cfg_t c;
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c = '0; c.mode = AGU_NORMAL; c.start = 16'd10; c.step = 16'd3;
    run(c, 40, "normal+3");
    c.start = 16'd500; c.step = -16'sd4;
    run(c, 40, "normal-4");
    c = '0; c.mode = AGU_MODULO; c.base = 16'd100; c.len = 16'd37; c.start = 16'd130; c.step = 16'd5;
    run(c, 80, "modulo+5");
    c.step = -16'sd3; c.start = 16'd101;
    run(c, 80, "modulo-3");
    c = '0; c.mode = AGU_BITREV; c.base = 16'd1024; c.rbits = 5'd8;
    run(c, 256, "bitrev8");
    c.rdig2 = 1'b1;
    run(c, 256, "digrev8");
    c.rbits = 5'd6; c.base = 16'd0;
    run(c, 64, "digrev6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
