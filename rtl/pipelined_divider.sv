// pipelined_divider: fully pipelined unsigned restoring divider.
//
// Computes quotient = dividend / divisor and remainder = dividend % divisor.
// Each pipeline stage settles one quotient bit, most significant first: it
// shifts the next dividend bit into the partial remainder and subtracts the
// divisor when the remainder is not smaller. With one bit per stage the
// latency equals the dividend width, STEPS = DIVIDEND_W clocks, and a new
// division can enter every clock. A tag travels alongside each operand pair so
// the consumer knows which result leaves the pipeline. Division by zero gives
// an all-ones quotient.
// The 40-step pipeline and the 24-bit divisor (three 8-bit channels) follow
// the accelerator description; the restoring structure and the tag are this
// design's own.
module pipelined_divider #(
  parameter int unsigned DIVIDEND_W = 40,
  parameter int unsigned DIVISOR_W  = 24,
  parameter int unsigned TAG_W      = 8,
  localparam int unsigned STEPS     = DIVIDEND_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  input  logic [TAG_W-1:0]      in_tag,
  output logic                  out_valid,
  output logic [DIVIDEND_W-1:0] quotient,
  output logic [DIVISOR_W-1:0]  remainder,
  output logic [TAG_W-1:0]      out_tag
);

  logic                  v_q [STEPS+1];
  logic [DIVISOR_W:0]    r_q [STEPS+1];   // partial remainder, one guard bit
  logic [DIVIDEND_W-1:0] n_q [STEPS+1];   // dividend bits still to shift in, then quotient bits
  logic [DIVISOR_W-1:0]  d_q [STEPS+1];
  logic [TAG_W-1:0]      t_q [STEPS+1];

  // Index 0 is the input; index s+1 is the register after step s.
  assign v_q[0] = in_valid;
  assign r_q[0] = '0;
  assign n_q[0] = dividend;
  assign d_q[0] = divisor;
  assign t_q[0] = in_tag;

  for (genvar s = 0; s < STEPS; s++) begin : g_step
    logic [DIVISOR_W:0] shifted;
    logic               ge;
    always_comb begin
      shifted = {r_q[s][DIVISOR_W-1:0], n_q[s][DIVIDEND_W-1]};
      ge      = shifted >= {1'b0, d_q[s]};
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q[s+1] <= 1'b0;
      else        v_q[s+1] <= v_q[s];
    end
    always_ff @(posedge clk) begin
      r_q[s+1] <= ge ? shifted - {1'b0, d_q[s]} : shifted;
      n_q[s+1] <= {n_q[s][DIVIDEND_W-2:0], ge};
      d_q[s+1] <= d_q[s];
      t_q[s+1] <= t_q[s];
    end
  end

  assign out_valid = v_q[STEPS];
  assign quotient  = n_q[STEPS];
  assign remainder = r_q[STEPS][DIVISOR_W-1:0];
  assign out_tag   = t_q[STEPS];

endmodule
