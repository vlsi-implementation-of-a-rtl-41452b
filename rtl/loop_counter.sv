// loop_counter: the 16-bit loop counter (LC).
//
// `load` sets the counter to `d`; `dec` counts it down by one; `zero` is
// high while it holds zero. Both act at a rising clock edge with `en`
// (the end of an M-cycle), load taking precedence. The document gives the
// width only; the load/decrement interface and its use by the LOOP
// branch condition are this design's choice.
module loop_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             dec,
  output logic [WIDTH-1:0] count,
  output logic             zero
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else if (en) begin
      if (load) count <= d;
      else if (dec && count != '0) count <= count - WIDTH'(1);
    end

  assign zero = (count == '0);

endmodule
