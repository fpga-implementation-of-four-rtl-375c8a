// flush_reg: pipeline register with valid bit, load enable and flush.
// load captures d and sets valid; flush (which wins) clears data and valid.
// Used for the registers around the weight update stage.
// The flush line on the pipeline registers follows the design; the valid
// bit and flush-over-load priority are this implementation's choices.
module flush_reg #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             flush,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     begin q <= '0; valid <= 1'b0; end
    else if (flush) begin q <= '0; valid <= 1'b0; end
    else if (load)  begin q <= d;  valid <= 1'b1; end
  end
endmodule
