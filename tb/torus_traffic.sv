// torus_traffic: testbench helper. Builds a hybrid_torus with the given size,
// message length and buffer depth, sends NMSG messages of random uniform
// traffic (each node injects with a probability of PCT percent of a message
// slot per cycle) and checks at every sink that each message arrives once,
// whole, in order and at its destination. Raises done when all messages have
// arrived or a drain limit ran out; counts checks, failures and the headers
// that took each path.
module torus_traffic
  import hybrid_pkg::*;
#(
  parameter int K    = 3,
  parameter int LEN  = 16,
  parameter int BUF  = 16,
  parameter int NMSG = 300,
  parameter int PCT  = 20
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fdp,
  output int   n_sdp,
  output int   n_ap,
  output int   n_delivered
);
  localparam int NODES = K * K * K;
  logic  [NODES-1:0]            inj_valid, inj_ready, ej_valid;
  flit_t [NODES-1:0]            inj_flit, ej_flit;
  logic  [NODES-1:0][NPORT-1:0] hdr_grant, hdr_fdp;

  hybrid_torus #(.K(K), .MSG_LEN(LEN), .BUF_DEPTH(BUF)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [L=%0d] %s (cycle %0d)", LEN, what, cyc);
    end
  endtask

  function automatic int cx(int n, int d);
    return (d == 0) ? n % K : (d == 1) ? (n / K) % K : n / (K * K);
  endfunction

  flit_t inj_q [NODES][$];
  int    next_id = 0;
  int    exp_dest [int];
  bit    delivered [int];

  task automatic queue_msg(int src, int dst);
    int id;
    flit_t f;
    id = next_id++;
    exp_dest[id] = dst;
    f.head = 1; f.tail = 0;
    f.payload = {4'(id), 4'(cx(dst, 2)), 4'(cx(dst, 1)), 4'(cx(dst, 0))};
    inj_q[src].push_back(f);
    for (int s = 1; s < LEN; s++) begin
      f.head = 0; f.tail = (s == LEN - 1);
      f.payload = 16'(id * 128 + s);
      inj_q[src].push_back(f);
    end
  endtask

  always @(negedge clk)
    for (int n = 0; n < NODES; n++) begin
      inj_valid[n] = (inj_q[n].size() != 0) && !rst;
      inj_flit[n]  = (inj_q[n].size() != 0) ? inj_q[n][0] : '0;
    end

  always @(posedge clk) if (!rst)
    for (int n = 0; n < NODES; n++)
      if (inj_valid[n] && inj_ready[n]) void'(inj_q[n].pop_front());

  int cur_id [NODES];
  int cur_seq [NODES];

  always @(negedge clk) if (!rst) begin
    for (int n = 0; n < NODES; n++) if (ej_valid[n]) begin
      flit_t f;
      f = ej_flit[n];
      if (f.head) begin
        check(cur_seq[n] == 0 && int'(f.payload[3:0]) == cx(n, 0) &&
              int'(f.payload[7:4]) == cx(n, 1) && int'(f.payload[11:8]) == cx(n, 2),
              "header at wrong node");
        cur_seq[n] = 1;
      end else begin
        if (cur_seq[n] == 1) begin
          cur_id[n] = int'(f.payload) / 128;
          check(exp_dest.exists(cur_id[n]) && exp_dest[cur_id[n]] == n, "message at wrong destination");
        end
        check(int'(f.payload) == cur_id[n] * 128 + cur_seq[n], "data flit out of order");
        cur_seq[n]++;
        if (f.tail) begin
          check(cur_seq[n] == LEN && !delivered.exists(cur_id[n]), "whole message, once");
          delivered[cur_id[n]] = 1;
          n_delivered++;
          cur_seq[n] = 0;
        end
      end
    end
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < NPORT; i++) if (hdr_grant[n][i]) begin
        if (hdr_fdp[n][i]) n_fdp++;
        else if (i != LOCAL && (i % NUM_VC) != int'(VC_ADAPT)) n_sdp++;
        else n_ap++;
      end
  end

  initial begin
    int t0;
    checks = 0; failures = 0; n_fdp = 0; n_sdp = 0; n_ap = 0; n_delivered = 0; done = 0;
    for (int n = 0; n < NODES; n++) begin cur_seq[n] = 0; cur_id[n] = 0; end
    @(negedge rst);
    while (next_id < NMSG) begin
      @(negedge clk);
      for (int n = 0; n < NODES; n++)
        if (next_id < NMSG && inj_q[n].size() < 2 * LEN && $urandom_range(0, 999) < PCT * 10 / LEN) begin
          int d;
          do d = $urandom_range(0, NODES - 1); while (d == n);
          queue_msg(n, d);
        end
    end
    t0 = cyc;
    while (n_delivered < NMSG && cyc - t0 < 40 * NMSG) @(negedge clk);
    check(n_delivered == NMSG, $sformatf("delivered %0d of %0d", n_delivered, NMSG));
    done = 1;
  end
endmodule
