// sync_2ff: two-flop synchroniser for a single-bit level crossing into the
// clock domain of clk. Output follows the input after two to three clk
// edges. Reset value is 0.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
endmodule
