// tb_cma: self-checking test of the configurable memory array.
//
// A shadow array in the testbench holds the expected contents. Each cycle the
// four channels issue random reads and writes (addresses drawn from a small
// window so that bank conflicts and same-word broadcasts are frequent). The
// expected grants follow the rule "lowest channel wins a bank; other reads of
// the winner's word are also served"; granted reads must return the shadow
// value and granted writes update it. Directed cases check a conflict-free
// 4-channel access and a same-bank conflict.
`timescale 1ns/1ps
module tb_cma;
  import sp_pkg::*;
  localparam int unsigned AW = 9;
  logic clk = 0;
  logic [3:0]   req, we, gnt;
  logic [AW-1:0] addr [4];
  vec_t wdata [4], rdata [4];
  vec_t shadow [512];
  int checks = 0, failures = 0, conflicts = 0, broadcasts = 0;

  cma dut (.clk, .req, .we, .addr, .wdata, .gnt, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // expected grant vector for the current request set
  function automatic logic [3:0] exp_gnt();
    logic [3:0] g = '0;
    for (int c = 0; c < 4; c++) begin
      int w = -1;
      if (!req[c]) continue;
      for (int k = 0; k < 4; k++)
        if (w < 0 && req[k] && addr[k][2:0] == addr[c][2:0]) w = k;
      g[c] = (w == c) || (!we[c] && !we[w] && addr[w] == addr[c]);
    end
    return g;
  endfunction

  initial begin
    req = 0; we = 0;
    for (int c = 0; c < 4; c++) begin addr[c] = 0; wdata[c] = 0; end
    // fill the whole array through channel 0..3 without conflicts
    for (int a = 0; a < 512; a += 4) begin
      for (int c = 0; c < 4; c++) begin
        addr[c] = AW'(a + c); wdata[c] = {4{32'($urandom)}}; shadow[a + c] = wdata[c];
      end
      req = 4'hF; we = 4'hF;
      #1 chk(gnt == 4'hF, "fill grant");
      @(posedge clk); #1;
    end
    // directed conflict: channels 1 and 3 hit bank 5 with different words
    req = 4'b1010; we = 0; addr[1] = 9'd13; addr[3] = 9'd21; #1;
    chk(gnt == 4'b0010, "conflict grant");
    chk(rdata[1] == shadow[13], "conflict read");
    // broadcast: same word on two channels
    addr[3] = 9'd13; #1;
    chk(gnt == 4'b1010, "broadcast grant");
    chk(rdata[3] == shadow[13], "broadcast read");
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] eg;
      req = 4'($urandom); we = 4'($urandom) & 4'($urandom);
      for (int c = 0; c < 4; c++) begin
        addr[c] = AW'($urandom_range(0, 23));
        wdata[c] = {4{32'($urandom)}};
      end
      #1;
      eg = exp_gnt();
      chk(gnt == eg, $sformatf("grant %b exp %b", gnt, eg));
      if ((req & ~gnt) != 0) conflicts++;
      for (int c = 0; c < 4; c++)
        if (gnt[c] && !we[c]) begin
          for (int k = 0; k < c; k++) if (gnt[k] && addr[k] == addr[c]) broadcasts++;
          chk(rdata[c] == shadow[addr[c]], $sformatf("read ch%0d addr %0d", c, addr[c]));
        end
      @(posedge clk);
      for (int c = 0; c < 4; c++) if (gnt[c] && we[c]) shadow[addr[c]] = wdata[c];
      #1;
    end
    chk(conflicts > 0 && broadcasts > 0, "conflicts and broadcasts exercised");
    $display("conflicts=%0d broadcasts=%0d", conflicts, broadcasts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
