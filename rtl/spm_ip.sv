// spm_ip: the SPM coprocessor (the "Automaton"). It sits between a
// MicroBlaze processor, reached over a Direct Fast Simplex Link (DFSL, a
// point-to-point word link without FIFO), and port B of the SPM block RAM.
// It lets a task read and write its heap and push and pull its stack in the
// SPM by sending a single instruction: the coprocessor finds the task's
// profiler in the SPM, performs the access, keeps the heap/stack pointers
// (in SPM and in the DRAM backup storage) up to date and tells the processor
// when the frame is full or a DMA copy to DRAM is needed.
//
// Four units, as in the paper's internal structure:
//   U1 instruction_decoder  FSL_M words -> direct SPM writes / task requests
//   U2 spm_handler          profiler load, heap/stack access, pointer updates
//   U3 cpu_interface        response word -> FSL_S_Data/Control/Exists, INTERRUPT
//   U4 spm_interface        BRAM port B for U1 and U2
// Port names are those of the paper's symbol of the coprocessor, in lower
// case. Xilinx numbers its buses (0:31) with bit 0 the most significant; here
// they are [31:0] with bit 31 the most significant. The whole block runs on
// fsl_clk with the synchronous, active-high fsl_rst. fsl_m_clk and fsl_s_clk
// belong to the asynchronous FSL variant; the Direct FSL link is synchronous
// to fsl_clk, so they are not used. fsl_m_control is not used either: the
// instruction word itself marks the start of a request.
module spm_ip
  import spm_pkg::*;
#(
  parameter logic [31:0] SPM_BASE       = SPM_BASE_DEFAULT,
  parameter int unsigned SPM_BYTES      = 131072,
  parameter logic [31:0] PROFILER_TABLE = PROFILER_TABLE_DEFAULT
) (
  input  logic        fsl_clk,
  input  logic        fsl_rst,
  // master side: MicroBlaze -> SPM_IP
  input  logic        fsl_m_clk,
  input  logic [31:0] fsl_m_data,
  input  logic        fsl_m_control,
  input  logic        fsl_m_write,
  output logic        fsl_m_full,
  // slave side: SPM_IP -> MicroBlaze
  input  logic        fsl_s_clk,
  output logic [31:0] fsl_s_data,
  output logic        fsl_s_control,
  output logic        fsl_s_exists,
  input  logic        fsl_s_read,
  output logic        interrupt,
  // BRAM port B
  input  logic [31:0] xil_bram_din_b,
  output logic [31:0] xil_bram_addr_b,
  output logic [31:0] xil_bram_dout_b,
  output logic [3:0]  xil_bram_wen_b,
  output logic        xil_bram_clk_b,
  output logic        xil_bram_en_b,
  output logic        xil_bram_rst_b
);
  logic        write_spm_active;
  logic [31:0] address_dec, data_dec, data_to_handler_from_dec;
  logic        active_spm_handler, handler_busy;
  logic [3:0]  id_task;
  req_e        request;
  logic [31:0] address_hdl, data_hdl, data_from_spm;
  logic        read_data_spm, write_data_spm, data_exists_spm, write_spm_ack;
  logic [31:0] data_to_cpu;
  logic        ctrl_to_cpu, write_data_cpu, cpu_busy;
  logic [31:0] prof_addr, heap_spm, stak_spm, heap_dram, stak_dram;

  instruction_decoder #(.SPM_BASE(SPM_BASE), .SPM_BYTES(SPM_BYTES)) u1 (
    .clk(fsl_clk), .rst(fsl_rst),
    .fsl_m_data, .fsl_m_write, .fsl_m_full,
    .handler_busy,
    .write_spm_active, .address_to_spm(address_dec), .data_to_spm(data_dec),
    .active_spm_handler, .id_task, .request,
    .data_to_spm_handler(data_to_handler_from_dec)
  );

  spm_handler #(.SPM_BASE(SPM_BASE), .SPM_BYTES(SPM_BYTES), .PROFILER_TABLE(PROFILER_TABLE)) u2 (
    .clk(fsl_clk), .rst(fsl_rst),
    .active(active_spm_handler), .id_task, .request,
    .data_from_cpu(data_to_handler_from_dec), .busy(handler_busy),
    .address_to_spm(address_hdl), .data_to_spm(data_hdl),
    .read_data_spm, .write_data_spm, .data_from_spm, .data_exists_spm, .write_spm_ack,
    .data_to_cpu, .ctrl_to_cpu, .write_data_cpu, .cpu_busy,
    .profiler_address(prof_addr), .heap_curr_ptr_spm(heap_spm), .stak_curr_ptr_spm(stak_spm),
    .heap_curr_ptr_dram(heap_dram), .stak_curr_ptr_dram(stak_dram)
  );

  cpu_interface u3 (
    .clk(fsl_clk), .rst(fsl_rst),
    .data_in(data_to_cpu), .ctrl_in(ctrl_to_cpu), .ready(write_data_cpu), .busy(cpu_busy),
    .fsl_s_data, .fsl_s_control, .fsl_s_exists, .fsl_s_read, .interrupt
  );

  spm_interface u4 (
    .clk(fsl_clk), .rst(fsl_rst),
    .write_spm_active, .address_from_decoder(address_dec), .data_from_decoder(data_dec),
    .read_data_spm, .write_data_spm,
    .address_from_handler(address_hdl), .data_from_handler(data_hdl),
    .data_to_handler(data_from_spm), .data_exists(data_exists_spm), .write_ack(write_spm_ack),
    .xil_bram_din_b, .xil_bram_addr_b, .xil_bram_dout_b, .xil_bram_wen_b,
    .xil_bram_en_b, .xil_bram_clk_b, .xil_bram_rst_b
  );
endmodule
