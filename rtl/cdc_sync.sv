// cdc_sync: two-flip-flop synchronizer for a single-bit level crossing into
// the clock domain of clk. Used for the start/done toggles and busy levels
// between the 200 MHz static region and the 66 MHz configuration domain.
// Output follows the input after two to three destination clock edges.
module cdc_sync #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= {RESET_VALUE, RESET_VALUE};
    else        {q, meta} <= {meta, d};
  end
endmodule
