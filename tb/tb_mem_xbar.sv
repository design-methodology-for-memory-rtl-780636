// tb_mem_xbar: sets random bank-to-port assignments (each bank owned by a
// distinct port or by none) and random traffic, and checks that every bank
// receives exactly its owner's request, every port gets its bank's response,
// and ports and banks without a partner see zero.
module tb_mem_xbar;
  import bb_pkg::*;
  localparam int NB = 4, NP = 6;
  logic clk = 0, rst_n = 0;
  logic [2:0] owner [NB];
  bank_req_t port_req [NP];
  bank_rsp_t port_rsp [NP];
  bank_req_t bank_req [NB];
  bank_rsp_t bank_rsp [NB];
  int checks = 0, failures = 0;

  mem_xbar #(.NB(NB), .NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lanes_t rnd_lanes();
    lanes_t l;
    for (int k = 0; k < LANES; k++) l[k] = $urandom;
    return l;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin owner[b] = 3'd7; bank_rsp[b] = '0; end
    for (int p = 0; p < NP; p++) port_req[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int perm [8];
      for (int i = 0; i < 8; i++) perm[i] = i;
      perm.shuffle();
      for (int b = 0; b < NB; b++) owner[b] = 3'(perm[b]);   // 6, 7: no port
      for (int p = 0; p < NP; p++) begin
        port_req[p].en = 1'($urandom);
        port_req[p].we = 1'($urandom);
        port_req[p].wdata = rnd_lanes();
      end
      for (int b = 0; b < NB; b++) begin
        bank_rsp[b].rvalid = 1'($urandom);
        bank_rsp[b].rdata = rnd_lanes();
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (owner[b] < NP) begin
          if (bank_req[b] !== port_req[owner[b]]) failures++;
        end else if (bank_req[b] !== '0) failures++;
      end
      for (int p = 0; p < NP; p++) begin
        bank_rsp_t w;
        w = '0;
        for (int b = 0; b < NB; b++) if (int'(owner[b]) == p) w = bank_rsp[b];
        checks++;
        if (port_rsp[p] !== w) begin
          failures++;
          if (failures < 10) $display("port %0d response wrong", p);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
