// rr_arbiter: round-robin arbiter.
//
// Grants the first requesting input at or after the priority pointer, going
// round the N inputs. When advance is high at a clock edge and something was
// granted, the pointer moves to the input after the winner, so every requester
// is served within N grants. grant is combinational from req and the pointer.
// Round-robin selection follows the message-selection policy of the router;
// the pointer scheme is this design's own choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] ptr;
  logic [PW-1:0] win;

  always_comb begin
    grant = '0;
    win   = ptr;
    // Scan from the farthest input back to the pointer: the last hit wins.
    for (int k = N - 1; k >= 0; k--) begin
      if (req[(int'(ptr) + k) % N]) begin
        grant = '0;
        grant[(int'(ptr) + k) % N] = 1'b1;
        win = PW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && |req) ptr <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
