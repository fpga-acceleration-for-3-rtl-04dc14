// step_size: diminishing relaxation coefficients of the asynchronous update,
// lambda_k = A_l / (B_l + k) for the image and mu_k = A_m / (B_m + k) for the
// edge indicator (eq. (7)); they satisfy sum = infinity, limit 0, which keeps
// the asynchronous, conflicting beam updates convergent. At start, with the
// iteration number k, two restoring dividers produce both values 42
// cycles after start; lambda and mu then hold until the next start (done pulses).
// Constants: A in 24 fractional bits, B in 8 fractional bits; the defaults
// are A = 1/500, B = 2 for lambda and A = 1/2000, B = 2.5 for mu, the values
// used for the reconstructions. Outputs have 24 fractional bits.
// From the reconstruction method: the form A/(B+k) and the constants. This
// design's own choices: the fixed-point formats and the serial dividers.
module step_size #(
  parameter logic [31:0] LAMBDA_A = 32'd33554,   // 1/500  * 2^24
  parameter logic [15:0] LAMBDA_B = 16'd512,     // 2      * 2^8
  parameter logic [31:0] MU_A     = 32'd8389,    // 1/2000 * 2^24
  parameter logic [15:0] MU_B     = 16'd640      // 2.5    * 2^8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] k,
  output logic        busy,
  output logic        done,
  output logic [31:0] lambda,
  output logic [31:0] mu
);
  localparam int NB = 40;   // numerator bits: A (Q24) << 8
  logic [NB-1:0] num [2], quo [2];
  logic [24:0]   den [2];
  logic [25:0]   rem [2];
  logic [5:0]    cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      lambda <= '0;
      mu     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num[0] <= NB'(LAMBDA_A) << 8;
        num[1] <= NB'(MU_A) << 8;
        den[0] <= 25'(LAMBDA_B) + (25'(k) << 8);
        den[1] <= 25'(MU_B) + (25'(k) << 8);
        rem[0] <= '0; rem[1] <= '0;
        quo[0] <= '0; quo[1] <= '0;
        cnt    <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        for (int d = 0; d < 2; d++) begin
          logic [26:0] r;
          r = {rem[d], num[d][NB-1]};
          num[d] <= num[d] << 1;
          if (r >= 27'(den[d])) begin
            rem[d] <= 26'(r - 27'(den[d]));
            quo[d] <= {quo[d][NB-2:0], 1'b1};
          end else begin
            rem[d] <= r[25:0];
            quo[d] <= {quo[d][NB-2:0], 1'b0};
          end
        end
        cnt <= cnt + 1'b1;
        if (cnt == 6'(NB)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          lambda <= 32'(quo[0]);
          mu     <= 32'(quo[1]);
        end
      end
    end
  end
endmodule
