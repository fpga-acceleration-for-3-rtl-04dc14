// rr_arbiter: round-robin arbiter that shares one tile-cache port among N
// PEs. The search for the next grant starts after the requester served
// last. A grant is sticky: once a requester is chosen it keeps the grant
// until its request is accepted, so a request held up by a cache miss is the
// one served right after the missing tile has been loaded and no requester
// can be starved by tile thrashing. Requesters must keep req high until
// accepted. The choice is combinational; the pointer moves on accept.
module rr_arbiter #(
  parameter int N = 48
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         accept,
  output logic                         gnt_valid,
  output logic [(N>1?$clog2(N):1)-1:0] gnt_idx
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last, hold_idx;
  logic          hold;

  logic [IW-1:0] j;
  logic [IW:0]   s;
  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    j         = '0;
    s         = '0;
    if (hold && req[hold_idx]) begin
      gnt_valid = 1'b1;
      gnt_idx   = hold_idx;
    end else begin
      for (int i = N; i >= 1; i--) begin
        // last + i lies below 2N, so one conditional subtract wraps it
        s = (IW+1)'(last) + (IW+1)'(i);
        if (s >= (IW+1)'(N)) s = s - (IW+1)'(N);
        j = IW'(s);
        if (req[j]) begin
          gnt_valid = 1'b1;
          gnt_idx   = IW'(j);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last <= IW'(N - 1);
      hold <= 1'b0;
      hold_idx <= '0;
    end else if (gnt_valid) begin
      if (accept) begin
        last <= gnt_idx;
        hold <= 1'b0;
      end else begin
        hold     <= 1'b1;
        hold_idx <= gnt_idx;
      end
    end
  end
endmodule
