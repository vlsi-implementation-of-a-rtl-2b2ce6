// delay_line: the "D" delay unit of the detector datapaths.
//
// A plain shift register that delays a WIDTH-bit word by D clock cycles
// (D = 0 is a wire). The detectors use it for the printed delay units (2, 3
// and 5 cycles in the 9-step datapath, 12 cycles in front of the 4x4 MUL of
// the 2-step detector) and, as this design's own choice, to hold operands read
// from memory until the pipeline stage that consumes them.
// Timing: dout(t) = din(t - D). Reset clears the register contents.
module delay_line #(
  parameter int WIDTH = 192,
  parameter int D     = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [WIDTH-1:0] sr [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < D; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[D-1];
  end
endmodule
