// sync2: two-flip-flop synchroniser for a slow asynchronous control line.
//
// The line is sampled twice on the rising clock edge; the output lags the
// input by two to three clock periods. Reset value is zero.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
