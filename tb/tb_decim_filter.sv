// tb_decim_filter: drives random samples (with idle gaps) through the filter
// at decimation by 1, 2 and 4 and in bypass, computes the filter
// [-1 0 9 16 9 0 -1]/32 here in floating point, and checks every output value
// (within 1 LSB), that exactly one output follows every 2^decim inputs and
// that it appears one cycle after the input that completes it.
module tb_decim_filter;
  import bb_pkg::*;
  localparam real H [7] = '{-1.0, 0.0, 9.0, 16.0, 9.0, 0.0, -1.0};
  logic clk = 0, rst_n = 0, clear = 0, bypass = 0, in_valid = 0, out_valid;
  logic [1:0] decim = '0;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  decim_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(int n, int d, logic byp);
    real hr [7], hi [7];
    int outs;
    for (int i = 0; i < 7; i++) begin hr[i] = 0.0; hi[i] = 0.0; end
    decim = 2'(d); bypass = byp; clear = 1;
    @(negedge clk);
    clear = 0;
    outs = 0;
    for (int i = 0; i < n; i++) begin
      real er, ei;
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
      in_data.re = 16'($urandom_range(0, 40000) - 20000);
      in_data.im = 16'($urandom_range(0, 40000) - 20000);
      for (int k = 6; k > 0; k--) begin hr[k] = hr[k-1]; hi[k] = hi[k-1]; end
      hr[0] = $itor(in_data.re); hi[0] = $itor(in_data.im);
      er = 0.0; ei = 0.0;
      for (int k = 0; k < 7; k++) begin er += H[k] * hr[k] / 32.0; ei += H[k] * hi[k] / 32.0; end
      if (byp) begin er = hr[0]; ei = hi[0]; end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid != (byp || (i % (1 << d)) == 0)) begin
        failures++;
        if (failures < 10) $display("decim %0d sample %0d: out_valid %b", d, i, out_valid);
      end
      if (out_valid) begin
        outs++;
        checks++;
        if (rabs($itor(out_data.re) - er) > 1.0 || rabs($itor(out_data.im) - ei) > 1.0) begin
          failures++;
          if (failures < 10) $display("decim %0d sample %0d: %h want %f %f", d, i, out_data, er, ei);
        end
      end
    end
    checks++;
    if (outs != (byp ? n : (n + (1 << d) - 1) / (1 << d))) failures++;
  endtask

  initial begin
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(300, 0, 0);
    run(300, 1, 0);
    run(400, 2, 0);
    run(100, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
