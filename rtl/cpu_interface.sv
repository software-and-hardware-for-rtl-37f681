// cpu_interface (unit U3 of the SPM coprocessor): the DFSL slave side
// towards the MicroBlaze.
//
// The SPM handler hands over one 32-bit response word with a one-cycle
// strobe (ready) and a control bit. This block holds the word on
// fsl_s_data and raises fsl_s_exists, fsl_s_control (the control bit) and
// interrupt until the processor takes the word with fsl_s_read. While a word
// waits, busy is high and the handler must not hand over another one: the
// Direct FSL link has no FIFO, so the link holds a single word.
// Raising FSL_S_Control, FSL_S_Exists and INTERRUPT with the word is the
// paper's; holding them until fsl_s_read is this design's choice (the
// usual FSL read handshake).
module cpu_interface (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data_in,
  input  logic        ctrl_in,
  input  logic        ready,
  output logic        busy,
  output logic [31:0] fsl_s_data,
  output logic        fsl_s_control,
  output logic        fsl_s_exists,
  input  logic        fsl_s_read,
  output logic        interrupt
);
  always_ff @(posedge clk) begin
    if (rst) begin
      fsl_s_data    <= '0;
      fsl_s_control <= 1'b0;
      fsl_s_exists  <= 1'b0;
    end else if (fsl_s_exists) begin
      if (fsl_s_read) begin
        fsl_s_exists  <= 1'b0;
        fsl_s_control <= 1'b0;
      end
    end else if (ready) begin
      fsl_s_data    <= data_in;
      fsl_s_control <= ctrl_in;
      fsl_s_exists  <= 1'b1;
    end
  end

  assign interrupt = fsl_s_exists;
  assign busy      = fsl_s_exists;

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) !(ready && fsl_s_exists));
endmodule
