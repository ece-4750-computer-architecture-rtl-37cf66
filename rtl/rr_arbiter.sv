// Round-robin arbiter.
//
// Grants one of N requesters per cycle, starting the search one past the
// requester granted last, so every persistent requester is served within
// N grants.  grant is one-hot (or zero when nothing requests) and purely
// combinational from req; the priority pointer moves only when en is high
// and a grant is made.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  logic found;

  always_comb begin
    grant = '0;
    found = 1'b0;
    for (int k = 1; k <= int'(N); k++) begin
      if (!found && req[(int'(last_q) + k) % int'(N)]) begin
        grant[(int'(last_q) + k) % int'(N)] = 1'b1;
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) last_q <= IW'(N-1);
    else if (en) begin
      for (int i = 0; i < int'(N); i++)
        if (grant[i]) last_q <= IW'(i);
    end
  end
endmodule
