// rst_sync: reset synchroniser. Reset is asserted at once (asynchronously)
// and released two clk edges after rst_in_n goes high, in step with clk.
module rst_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic r1;
  always_ff @(posedge clk or negedge rst_in_n)
    if (!rst_in_n) {rst_out_n, r1} <= 2'b00;
    else           {rst_out_n, r1} <= {r1, 1'b1};
endmodule
