// sc_mem: per-subcarrier buffer for channel matrices and intermediate values.
//
// DEPTH words, one per subcarrier, each made of NF fields of FW bits (one
// 2x2 complex block per field). A step of the detector writes only the
// fields it produces (per-field write enables) and reads all the fields it
// needs in a single access. In the published design this is the external
// memory the detector shares with channel estimation and decoding; here it
// is an array inside each detector so that the design is self-contained.
// Timing: synchronous write on the rising edge; asynchronous read, so that a
// subcarrier addressed in a cycle enters the pipeline in the same cycle.
// Contents are not reset; every location is written before it is read.
module sc_mem #(
  parameter int DEPTH = 512,
  parameter int NF    = 9,
  parameter int FW    = 192,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [NF-1:0]    we,
  input  logic [AW-1:0]    waddr,
  input  logic [NF*FW-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [NF*FW-1:0] rdata
);
  logic [NF*FW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    for (int f = 0; f < NF; f++)
      if (we[f]) mem[waddr][f*FW +: FW] <= wdata[f*FW +: FW];

  assign rdata = mem[raddr];
endmodule
