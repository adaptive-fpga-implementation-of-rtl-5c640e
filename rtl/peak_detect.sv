// peak_detect: finds the largest value of a response map streamed in one
// value per clock, and reports its position: the detected object location
// of a tracking-by-detection step.
//
// A running maximum and its index are kept; a value replaces the maximum
// only if it is strictly larger, so of equal peaks the first one wins.
// in_last closes a map: one clock later peak_valid pulses with the index
// and value of the maximum, and the search restarts with the next value.
//
// Interface: in_valid/in_value/in_index/in_last (unsigned values, any index
// order); peak_valid/peak_index/peak_value.
// Timing: one value per clock; result registered one clock after in_last.
//
// Taking the location at the peak of the response follows the published
// method; the tie rule and the interface are this design's choices.
module peak_detect #(
  parameter int VW = 16,   // value width
  parameter int XW = 6     // index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [VW-1:0] in_value,
  input  logic [XW-1:0] in_index,
  output logic          peak_valid,
  output logic [XW-1:0] peak_index,
  output logic [VW-1:0] peak_value
);

  logic          have_q;
  logic [VW-1:0] best_v_q, best_v;
  logic [XW-1:0] best_i_q, best_i;

  always_comb begin
    best_v = best_v_q;
    best_i = best_i_q;
    if (!have_q || in_value > best_v_q) begin
      best_v = in_value;
      best_i = in_index;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q     <= 1'b0;
      best_v_q   <= '0;
      best_i_q   <= '0;
      peak_valid <= 1'b0;
      peak_index <= '0;
      peak_value <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          have_q     <= 1'b0;
          peak_valid <= 1'b1;
          peak_index <= best_i;
          peak_value <= best_v;
        end else begin
          have_q   <= 1'b1;
          best_v_q <= best_v;
          best_i_q <= best_i;
        end
      end
    end
  end

endmodule
