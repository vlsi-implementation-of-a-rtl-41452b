// pm_refresh: refresh timing for the dynamic program memory (the
// "refresh register").
//
// A 4-bit counter counts M-cycles; every 16th M-cycle `refresh` is high
// and the PM uses that M-cycle's fetch slot to refresh the row given by
// `row`. The 5-bit row counter (32 rows of the 32 x 32 cell planes)
// advances after each refresh, so the whole memory is refreshed every
// 512 M-cycles. `en` marks the last step of each M-cycle. Period, row
// count and counter width follow the document.
module pm_refresh #(
  parameter int unsigned PERIOD   = 16,
  parameter int unsigned ROW_BITS = 5,
  localparam int unsigned CW      = $clog2(PERIOD)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic                refresh,
  output logic [ROW_BITS-1:0] row
);

  logic [CW-1:0] cnt;

  assign refresh = (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0;
      row <= '0;
    end else if (en) begin
      cnt <= refresh ? '0 : cnt + CW'(1);
      if (refresh) row <= row + ROW_BITS'(1);
    end

endmodule
