// rst_sync: reset synchroniser. The reset is asserted asynchronously and
// released two clk edges after rst_n rises, so every clock domain leaves
// reset cleanly on its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rst_n_sync, r1} <= 2'b00;
    else        {rst_n_sync, r1} <= {r1, 1'b1};
  end
endmodule
