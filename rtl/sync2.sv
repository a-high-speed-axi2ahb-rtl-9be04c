// sync2: multi-flop synchroniser for a signal entering the clock domain of clk.
//
// The first flop may go metastable when d changes near the edge of clk; the
// following flops give it a full clock period to settle before q is used, so
// q is d delayed by STAGES edges of clk. STAGES = 2 is the classic two-flop
// synchroniser. Each bit is synchronised on its own, so WIDTH > 1 is only
// safe for bits that change independently (the bridge uses it for single
// toggle bits). Reset is asynchronous and active low and clears all flops to
// RESET_VAL.
module sync2 #(
  parameter int unsigned    WIDTH     = 1,
  parameter int unsigned    STAGES    = 2,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] ff [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) ff[i] <= RESET_VAL;
    end else begin
      ff[0] <= d;
      for (int i = 1; i < STAGES; i++) ff[i] <= ff[i-1];
    end
  end

  assign q = ff[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync2: STAGES must be at least 2");

endmodule
