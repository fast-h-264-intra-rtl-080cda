// pipe_delay: a plain shift register that delays a WIDTH-bit word by DEPTH
// clock cycles (DEPTH >= 1). Used to carry the predicted pixels and the
// quantised levels alongside the blocks through the stages that do not use
// them. Reset clears every stage.
module pipe_delay #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);
  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d_i;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign q_o = sr[DEPTH-1];
endmodule
