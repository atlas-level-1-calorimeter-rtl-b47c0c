// sat_counter: W-bit error counter that stops at its maximum value.
// inc adds one unless the counter is full; clr (synchronous) returns it to 0
// and wins over inc. Used for the 12-bit channel error counters.
module sat_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   cnt <= '0;
    else if (clr)                 cnt <= '0;
    else if (inc && !(&cnt))      cnt <= cnt + 1'b1;
  end
endmodule
