// tb_hybrid_msglen: the longer message sizes of the evaluation, each with
// buffers of one message: 16-flit and 64-flit messages on a 3-ary 3-cube
// (27 routers each) under random uniform traffic. Every message must arrive
// whole and in order at its destination, and each network must use the fast,
// slow and adaptive paths.
module tb_hybrid_msglen;
  logic clk = 0, rst = 1;
  logic done16, done64;
  int c16, f16, fdp16, sdp16, ap16, d16;
  int c64, f64, fdp64, sdp64, ap64, d64;
  int checks, failures;

  torus_traffic #(.K(3), .LEN(16), .BUF(16), .NMSG(400), .PCT(25)) u16 (
    .clk, .rst, .done(done16), .checks(c16), .failures(f16),
    .n_fdp(fdp16), .n_sdp(sdp16), .n_ap(ap16), .n_delivered(d16));
  torus_traffic #(.K(3), .LEN(64), .BUF(64), .NMSG(150), .PCT(25)) u64 (
    .clk, .rst, .done(done64), .checks(c64), .failures(f64),
    .n_fdp(fdp64), .n_sdp(sdp64), .n_ap(ap64), .n_delivered(d64));

  always #5 clk = ~clk;

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    checks = c16 + c64;
    failures = f16 + f64 + 1;
    $display("watchdog expired");
    report();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done16 && done64);
    @(negedge clk);
    checks = c16 + c64 + 6;
    failures = f16 + f64;
    $display("L=16: %0d messages, fdp=%0d sdp=%0d ap=%0d", d16, fdp16, sdp16, ap16);
    $display("L=64: %0d messages, fdp=%0d sdp=%0d ap=%0d", d64, fdp64, sdp64, ap64);
    if (fdp16 == 0 || sdp16 == 0 || ap16 == 0) failures++;
    if (fdp64 == 0 || sdp64 == 0 || ap64 == 0) failures++;
    if (d16 != 400) failures++;
    if (d64 != 150) failures++;
    report();
  end
endmodule
