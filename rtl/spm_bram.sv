// spm_bram: the scratch pad memory, a true dual-port block RAM.
//
// The SPM is 128 KB of on-chip block RAM (32-bit words). Port A belongs to
// the PLB side (BRAM controller, and the DMA controller when it holds the
// buses); port B belongs to the SPM coprocessor. Both ports follow the Xilinx
// BRAM port convention: a byte address whose word index is addr[..:2], an
// enable, four byte write enables and a read data output that is registered
// (valid in the cycle after the address was presented with en=1).
// Size and the two ports follow the paper; the read-first behaviour on a
// write and the byte-enable handling are this design's choice. The two ports
// write one array from two clocked processes, the usual true dual-port RAM
// template, so they use plain always blocks (always_ff allows one driver). A write on both
// ports to the same word in the same cycle leaves port B's data.
module spm_bram #(
  parameter int unsigned BYTES = 131072
) (
  input  logic        clk_a,
  input  logic        en_a,
  input  logic [3:0]  we_a,
  input  logic [31:0] addr_a,
  input  logic [31:0] wdata_a,
  output logic [31:0] rdata_a,
  input  logic        clk_b,
  input  logic        en_b,
  input  logic [3:0]  we_b,
  input  logic [31:0] addr_b,
  input  logic [31:0] wdata_b,
  output logic [31:0] rdata_b
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  wire [AW-1:0] wa = addr_a[AW+1:2];
  wire [AW-1:0] wb = addr_b[AW+1:2];

  always @(posedge clk_a) begin
    if (en_a) begin
      rdata_a <= mem[wa];
      for (int i = 0; i < 4; i++)
        if (we_a[i]) mem[wa][8*i +: 8] <= wdata_a[8*i +: 8];
    end
  end

  always @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[wb];
      for (int i = 0; i < 4; i++)
        if (we_b[i]) mem[wb][8*i +: 8] <= wdata_b[8*i +: 8];
    end
  end
endmodule
