// tb_spram: writes random words to random rows of the single-port SRAM,
// keeps a reference copy, and checks every read one cycle after it is
// issued, plus that rdata holds while the memory is idle.
module tb_spram;
  localparam int DEPTH = 2048;
  logic clk = 0, en = 0, we = 0;
  logic [10:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  spram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      logic [10:0] a;
      logic [31:0] d;
      a = 11'($urandom_range(0, 255));
      d = $urandom;
      if ($urandom_range(0, 1) == 1) begin
        en = 1; we = 1; addr = a; wdata = d;
        @(negedge clk);
        ref_mem[a] = d;
      end else begin
        en = 1; we = 0; addr = a;
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== ref_mem[a]) begin
          failures++;
          $display("read %0d: got %h want %h t=%0t", a, rdata, ref_mem[a], $time);
        end
        addr = ~a;
        @(negedge clk);
        checks++;
        if (rdata !== ref_mem[a]) failures++;
      end
      en = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
