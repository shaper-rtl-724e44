// shaper_csr: control and status registers seen by the host.
//
// The host's kernel functions write algorithm parameters and flags here.
// Map (64-bit registers, word addresses):
//   0 .. NSEED-1  CSPRNG seed block, 64 bits each (lane 0 first)
//   NSEED         control: writing bit 0 = 1 loads the seed into the CSPRNG
//                 (one-cycle seed_valid pulse); writing bit 1 = 1 clears the
//                 done interrupt
//   NSEED+1       status (read only): {.., illegal, rng_seeded, all_idle, irq}
//   NSEED+2       event counter: bundles accepted (read only)
// The interrupt rises when the accelerator becomes idle after having been
// busy, which is how the host learns that a batch of bundles finished.
// Reads return data the cycle after csr_re.  The existence of CSRs and the
// interrupt follow the design description; the map is this implementation's.
module shaper_csr #(
  parameter int unsigned RATE = 1088
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            csr_we,
  input  logic            csr_re,
  input  logic [7:0]      csr_addr,
  input  logic [63:0]     csr_wdata,
  output logic [63:0]     csr_rdata,
  // to / from the accelerator
  output logic            seed_valid,
  output logic [RATE-1:0] seed_block,
  input  logic            all_idle,
  input  logic            rng_seeded,
  input  logic            illegal,
  input  logic            ev_bundle,
  output logic            irq
);
  localparam int unsigned NSEED = RATE / 64;

  logic [NSEED-1:0][63:0] seed_r;
  logic [31:0]            n_bundle;
  logic                   idle_q;

  assign seed_block = seed_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed_r     <= '0;
      seed_valid <= 1'b0;
      irq        <= 1'b0;
      idle_q     <= 1'b1;
      n_bundle   <= '0;
      csr_rdata  <= '0;
    end else begin
      seed_valid <= 1'b0;
      idle_q     <= all_idle;
      if (all_idle && !idle_q) irq <= 1'b1;
      if (ev_bundle) n_bundle <= n_bundle + 32'd1;
      if (csr_we) begin
        if (csr_addr < 8'(NSEED)) begin
          seed_r[csr_addr[$clog2(NSEED)-1:0]] <= csr_wdata;
        end else if (csr_addr == 8'(NSEED)) begin
          if (csr_wdata[0]) seed_valid <= 1'b1;
          if (csr_wdata[1]) irq <= 1'b0;
        end
      end
      if (csr_re) begin
        if (csr_addr < 8'(NSEED))            csr_rdata <= seed_r[csr_addr[$clog2(NSEED)-1:0]];
        else if (csr_addr == 8'(NSEED + 1))  csr_rdata <= {60'd0, illegal, rng_seeded, all_idle, irq};
        else if (csr_addr == 8'(NSEED + 2))  csr_rdata <= {32'd0, n_bundle};
        else                                 csr_rdata <= '0;
      end
    end
  end
endmodule
