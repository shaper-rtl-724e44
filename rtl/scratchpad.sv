// scratchpad: on-chip scratchpad memory (SPM) of the accelerator.
//
// DEPTH lines of W bits; one line holds one big integer of the Paillier
// domain, or a vector of 64-bit secret shares.  NPORT independent ports
// (one per client: AHE unit, SS unit, data mover) each read or write one
// line per cycle.  Reads return data the cycle after en (registered);
// a write and a read of the same line in one cycle return the old data;
// if two ports write the same line in one cycle, the lower-numbered port
// wins.  The SPM is named by the design description (512 block RAMs in
// Table 3 give 6144 lines of 3072 bits); its organisation into ports and
// lines is this implementation's choice.
module scratchpad #(
  parameter int unsigned W     = 3072,
  parameter int unsigned DEPTH = 6144,
  parameter int unsigned NPORT = 3,
  parameter int unsigned AW    = shaper_pkg::clog2i(DEPTH)
) (
  input  logic                     clk,
  input  logic [NPORT-1:0]         en,
  input  logic [NPORT-1:0]         we,
  input  logic [NPORT-1:0][AW-1:0] addr,
  input  logic [NPORT-1:0][W-1:0]  wdata,
  output logic [NPORT-1:0][W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = NPORT - 1; p >= 0; p--) begin
      if (en[p] && we[p]) mem[addr[p]] <= wdata[p];
    end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (en[p] && !we[p]) rdata[p] <= mem[addr[p]];
    end
  end
endmodule
