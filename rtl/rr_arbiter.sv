// Round-robin arbiter.
//
// Picks one of N requesters each cycle, starting the search just after the
// requester granted last, so that every requester is served within N grants.
// The grant is combinational (gnt_valid, gnt_idx); the search pointer moves
// only when the caller signals with 'take' that the granted request was
// served. Used by the column controller (pixels), the matrix controller
// (columns) and the end-of-column logic (TDCs); the document does not say how
// these buses are shared, so fair rotation is this design's choice.
module rr_arbiter #(
  parameter int N  = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          take,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx
);
  logic [IW-1:0] ptr;  // first index searched this cycle

  always_comb begin
    int idx;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      idx = int'(ptr) + i;
      if (idx >= N) idx -= N;
      if (req[idx]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (take && gnt_valid) ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end
endmodule
