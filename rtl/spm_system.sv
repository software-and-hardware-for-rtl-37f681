// spm_system: the SPM subsystem of one processor core.
//
// A scratch pad memory (SPM, 128 KB dual-port block RAM) is shared by three
// users: the SPM coprocessor (spm_ip) on port B, which serves the tasks' heap
// and stack requests sent by the processor over the Direct FSL link; and, on
// port A, either the processor's bus (through the PLB BRAM controller) or the
// DMA controller, which copies blocks between the DRAM and the SPM. Port A
// goes to the DMA controller while it holds the bus grant (dreq and dgrant
// both high), and to the bus otherwise.
// The processor, the PLB bus with its BRAM controller, the DDR2 memory
// controller and the operating system are outside this block: their signals
// are ports (fsl_*, plb_bram_*, dgrant, dma command, dram_*). Everything runs
// on one clock, clk, with a synchronous active-high reset, rst.
// The system structure is the paper's; the port A multiplexer and the
// single clock are this design's choice.
module spm_system
  import spm_pkg::*;
#(
  parameter int unsigned SPM_BYTES      = 131072,
  parameter logic [31:0] SPM_BASE       = SPM_BASE_DEFAULT,
  parameter logic [31:0] PROFILER_TABLE = PROFILER_TABLE_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  // Direct FSL link with the processor
  input  logic [31:0] fsl_m_data,
  input  logic        fsl_m_control,
  input  logic        fsl_m_write,
  output logic        fsl_m_full,
  output logic [31:0] fsl_s_data,
  output logic        fsl_s_control,
  output logic        fsl_s_exists,
  input  logic        fsl_s_read,
  output logic        interrupt,
  // SPM port A as driven by the PLB BRAM controller
  input  logic        plb_bram_en,
  input  logic [3:0]  plb_bram_we,
  input  logic [31:0] plb_bram_addr,
  input  logic [31:0] plb_bram_wdata,
  output logic [31:0] plb_bram_rdata,
  // DMA command from the operating system, and its end signal
  input  logic        dma_start,
  input  logic        dma_to_spm,
  input  logic        dma_spm_not_full,
  input  logic [31:0] dma_spm_addr,
  input  logic [31:0] dma_dram_addr,
  input  logic [15:0] dma_len_words,
  output logic        dma_busy,
  output logic        dma_done,
  output logic        dma_to_bs,
  // bus request / grant with the processor
  output logic        dreq,
  input  logic        dgrant,
  // DRAM word port of the DMA controller
  output logic        dram_req,
  output logic        dram_we,
  output logic [31:0] dram_addr,
  output logic [31:0] dram_wdata,
  input  logic        dram_ack,
  input  logic [31:0] dram_rdata
);
  logic [31:0] b_din, b_addr, b_dout;
  logic [3:0]  b_wen;
  logic        b_clk, b_en, b_rst;

  logic        d_en;
  logic [3:0]  d_we;
  logic [31:0] d_a, d_wdata;
  logic        a_en;
  logic [3:0]  a_we;
  logic [31:0] a_addr, a_wdata, a_rdata;
  logic        dma_owns;

  spm_ip #(.SPM_BASE(SPM_BASE), .SPM_BYTES(SPM_BYTES), .PROFILER_TABLE(PROFILER_TABLE)) u_spm_ip (
    .fsl_clk(clk), .fsl_rst(rst),
    .fsl_m_clk(clk), .fsl_m_data, .fsl_m_control, .fsl_m_write, .fsl_m_full,
    .fsl_s_clk(clk), .fsl_s_data, .fsl_s_control, .fsl_s_exists, .fsl_s_read, .interrupt,
    .xil_bram_din_b(b_din), .xil_bram_addr_b(b_addr), .xil_bram_dout_b(b_dout),
    .xil_bram_wen_b(b_wen), .xil_bram_clk_b(b_clk), .xil_bram_en_b(b_en), .xil_bram_rst_b(b_rst)
  );

  dma_controller u_dma (
    .clk, .rst,
    .start(dma_start), .to_spm(dma_to_spm), .spm_not_full(dma_spm_not_full),
    .spm_addr(dma_spm_addr), .dram_addr(dma_dram_addr), .len_words(dma_len_words),
    .busy(dma_busy), .done(dma_done), .to_bs(dma_to_bs),
    .dreq, .dgrant,
    .spm_en(d_en), .spm_we(d_we), .spm_a(d_a), .spm_wdata(d_wdata), .spm_rdata(a_rdata),
    .dram_req, .dram_we, .dram_a(dram_addr), .dram_wdata, .dram_ack, .dram_rdata
  );

  assign dma_owns = dreq && dgrant;
  always_comb begin
    if (dma_owns) begin
      a_en = d_en;  a_we = d_we;  a_addr = d_a;  a_wdata = d_wdata;
    end else begin
      a_en = plb_bram_en; a_we = plb_bram_we; a_addr = plb_bram_addr; a_wdata = plb_bram_wdata;
    end
  end
  assign plb_bram_rdata = a_rdata;

  // b_rst (BRAM output reset) is not used: the block RAM model has no output reset.
  spm_bram #(.BYTES(SPM_BYTES)) u_spm (
    .clk_a(clk), .en_a(a_en), .we_a(a_we), .addr_a(a_addr), .wdata_a(a_wdata), .rdata_a(a_rdata),
    .clk_b(b_clk), .en_b(b_en), .we_b(b_wen), .addr_b(b_addr), .wdata_b(b_dout), .rdata_b(b_din)
  );
endmodule
