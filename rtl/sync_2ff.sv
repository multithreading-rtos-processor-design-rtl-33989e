// sync_2ff: two-flip-flop synchronizer for signals crossing from the memory
// controller's clock domain into the SoC clock domain.
//
// The asynchronous input is sampled by a first flip-flop that may go
// metastable and re-sampled by a second one, whose output is used. The
// output follows the input two destination-clock edges later. Each bit is
// synchronized on its own, so only single-bit flags or Gray-coded values
// should be passed. Reset clears both stages. The two-stage structure
// follows the SoC's clock-synchronization scheme; the width is a parameter.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
