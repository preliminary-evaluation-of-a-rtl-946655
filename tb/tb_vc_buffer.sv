// tb_vc_buffer: random pushes and pops against a queue model; checks the head
// flit, empty, full and the occupancy count every cycle.
module tb_vc_buffer;
  import hybrid_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, empty, full;
  flit_t wr_flit, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model[$];

  vc_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_flit = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(head == model[0], "head");
      // bias towards filling in the first half, draining in the second
      rd_en = (model.size() != 0) && ($urandom_range(0, 99) < ((cyc % 600) < 300 ? 35 : 70));
      wr_en = ((model.size() < DEPTH) || rd_en) && ($urandom_range(0, 99) < ((cyc % 600) < 300 ? 70 : 35));
      wr_flit = flit_t'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
