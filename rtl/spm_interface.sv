// spm_interface (unit U4 of the SPM coprocessor): owner of BRAM port B.
//
// Two units use the SPM through this block. The instruction decoder issues
// direct writes (write_spm_active, one-cycle pulse, always accepted and given
// priority). The SPM handler issues reads (read_data_spm) and writes
// (write_data_spm) as levels held until this block answers.
// A handler access is presented to the BRAM in the cycle it is accepted; in
// the next cycle this block raises data_exists (read, data on
// data_to_handler, taken straight from the BRAM output register) or
// write_ack (write). One handler access therefore takes two cycles, and no new
// handler access is accepted in the answering cycle.
// Port names follow the coprocessor's block diagram (XIL_BRAM_*_B); the
// timing, the priority and the two-cycle access are this design's choice.
module spm_interface (
  input  logic        clk,
  input  logic        rst,
  // direct write from the instruction decoder
  input  logic        write_spm_active,
  input  logic [31:0] address_from_decoder,
  input  logic [31:0] data_from_decoder,
  // accesses from the SPM handler
  input  logic        read_data_spm,
  input  logic        write_data_spm,
  input  logic [31:0] address_from_handler,
  input  logic [31:0] data_from_handler,
  output logic [31:0] data_to_handler,
  output logic        data_exists,
  output logic        write_ack,
  // BRAM port B
  input  logic [31:0] xil_bram_din_b,
  output logic [31:0] xil_bram_addr_b,
  output logic [31:0] xil_bram_dout_b,
  output logic [3:0]  xil_bram_wen_b,
  output logic        xil_bram_en_b,
  output logic        xil_bram_clk_b,
  output logic        xil_bram_rst_b
);
  logic pend_rd, pend_wr;
  logic issue;

  assign issue = (read_data_spm || write_data_spm) && !write_spm_active && !pend_rd && !pend_wr;

  always_comb begin
    xil_bram_en_b   = 1'b0;
    xil_bram_wen_b  = 4'h0;
    xil_bram_addr_b = address_from_handler;
    xil_bram_dout_b = data_from_handler;
    if (write_spm_active) begin
      xil_bram_en_b   = 1'b1;
      xil_bram_wen_b  = 4'hF;
      xil_bram_addr_b = address_from_decoder;
      xil_bram_dout_b = data_from_decoder;
    end else if (issue) begin
      xil_bram_en_b   = 1'b1;
      xil_bram_wen_b  = write_data_spm ? 4'hF : 4'h0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_rd <= 1'b0;
      pend_wr <= 1'b0;
    end else begin
      pend_rd <= issue && read_data_spm;
      pend_wr <= issue && write_data_spm;
    end
  end

  assign data_exists     = pend_rd;
  assign write_ack       = pend_wr;
  assign data_to_handler = xil_bram_din_b;
  assign xil_bram_clk_b  = clk;
  assign xil_bram_rst_b  = rst;

  a_one_kind: assert property (@(posedge clk) disable iff (rst) !(read_data_spm && write_data_spm));
endmodule
