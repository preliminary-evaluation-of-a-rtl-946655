// tb_vc_controller: three VCs offer flits at random while a model of the
// downstream buffers drains them at random and returns credits. The expected
// winner is worked out from a round-robin model over the VCs that have a flit
// and a free downstream slot; the link, the sent vector and the room flags
// (a whole message fits downstream) are compared every cycle. Also checks
// that the channel carries a flit every cycle while one is eligible.
module tb_vc_controller;
  import hybrid_pkg::*;
  localparam int BUF = 8, LEN = 4;
  logic clk = 0, rst = 1;
  logic [NUM_VC-1:0] cand_valid, sent, credit_in, room;
  flit_t [NUM_VC-1:0] cand_flit;
  link_t link;
  int checks = 0, failures = 0;
  int credits [NUM_VC];
  int ptr = 0;
  int busy = 0;

  vc_controller #(.BUF_DEPTH(BUF), .MSG_LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int w;
    cand_valid = 0; cand_flit = '0; credit_in = 0;
    for (int v = 0; v < NUM_VC; v++) credits[v] = BUF;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int v = 0; v < NUM_VC; v++) begin
        cand_valid[v] = ($urandom_range(0, 99) < 60);
        cand_flit[v]  = flit_t'($urandom);
        credit_in[v]  = (credits[v] < BUF) && ($urandom_range(0, 99) < ((cyc % 1000) < 500 ? 20 : 60));
      end
      #1;
      w = -1;
      for (int k = 0; k < NUM_VC; k++) begin
        int v;
        v = (ptr + k) % NUM_VC;
        if (w < 0 && cand_valid[v] && credits[v] > 0) w = v;
      end
      for (int v = 0; v < NUM_VC; v++) begin
        check(sent[v] == (w == v), $sformatf("sent[%0d]", v));
        check(room[v] == (credits[v] >= LEN), $sformatf("room[%0d]", v));
      end
      check(link.valid == (w >= 0), "link valid");
      if (w >= 0) begin
        busy++;
        check(int'(link.vc) == w && link.flit == cand_flit[w], "link vc/flit");
      end
      @(posedge clk);
      if (w >= 0) begin
        credits[w]--;
        ptr = (w + 1) % NUM_VC;
      end
      for (int v = 0; v < NUM_VC; v++) if (credit_in[v]) credits[v]++;
    end
    check(busy > 1000, "channel used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
