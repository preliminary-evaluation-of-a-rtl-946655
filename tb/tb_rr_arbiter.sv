// tb_rr_arbiter: random requests; the expected grant is worked out from a
// model pointer that moves past each winner. Also checks that a constantly
// requesting input is served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, grant;
  logic advance;
  int checks = 0, failures = 0;
  int ptr = 0;
  int wait0 = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    int w;
    req = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      req = N'($urandom);
      req[0] = 1'b1;            // input 0 always asks
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp = '0; w = -1;
      for (int k = 0; k < N; k++)
        if (w < 0 && req[(ptr + k) % N]) w = (ptr + k) % N;
      if (w >= 0) exp[w] = 1'b1;
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL req=%b ptr=%0d grant=%b exp=%b", req, ptr, grant, exp);
      end
      if (advance) begin
        if (grant[0]) wait0 = 0; else wait0++;
      end
      checks++;
      if (wait0 >= N) begin
        failures++;
        $display("FAIL input 0 starved");
        wait0 = 0;
      end
      @(posedge clk);
      if (advance && w >= 0) ptr = (w + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
