// instruction_decoder (unit U1 of the SPM coprocessor): receives the words the
// MicroBlaze writes on the DFSL master link and turns them into work.
//
// The first word of a request is the instruction (layout in spm_pkg).
//  * CMD 00, direct write: two more words follow, the data and then the byte
//    address. If the address lies in the SPM window, a one-cycle
//    write_spm_active pulse writes the word through the SPM interface.
//    Otherwise the request is outside the SPM and is handed to the SPM handler
//    as REQ_REDIRECT with the address, to be sent back to the processor.
//  * CMD 11, task access: TASK_ID and REQUEST go to the SPM handler with a
//    one-cycle active_spm_handler pulse. A heap store or a stack push takes one
//    more word, the data, before the pulse.
// Words are taken when fsl_m_write is high and fsl_m_full low. fsl_m_full is
// high while the handler works (handler_busy) and in the cycle of the pulse.
// Instructions with another CMD or an unknown REQUEST are dropped.
// The word order of a direct write (instruction, data, address) and the
// command codes follow the paper's simulation; the full flag and the
// dropping of unknown instructions are this design's choice.
module instruction_decoder
  import spm_pkg::*;
#(
  parameter logic [31:0] SPM_BASE  = SPM_BASE_DEFAULT,
  parameter int unsigned SPM_BYTES = 131072
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] fsl_m_data,
  input  logic        fsl_m_write,
  output logic        fsl_m_full,
  input  logic        handler_busy,
  // direct write towards the SPM interface
  output logic        write_spm_active,
  output logic [31:0] address_to_spm,
  output logic [31:0] data_to_spm,
  // task request towards the SPM handler
  output logic        active_spm_handler,
  output logic [3:0]  id_task,
  output req_e        request,
  output logic [31:0] data_to_spm_handler
);
  typedef enum logic [1:0] {S_INSTR, S_WDATA, S_WADDR, S_TDATA} state_e;
  state_e state;

  logic take;
  assign fsl_m_full = handler_busy || active_spm_handler;
  assign take       = fsl_m_write && !fsl_m_full;

  function automatic logic in_spm(logic [31:0] a);
    return (a - SPM_BASE) < 32'(SPM_BYTES);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state               <= S_INSTR;
      write_spm_active    <= 1'b0;
      active_spm_handler  <= 1'b0;
      address_to_spm      <= '0;
      data_to_spm         <= '0;
      id_task             <= '0;
      request             <= REQ_NONE;
      data_to_spm_handler <= '0;
    end else begin
      write_spm_active   <= 1'b0;
      active_spm_handler <= 1'b0;
      if (take) begin
        unique case (state)
          S_INSTR: begin
            if (fsl_m_data[31:30] == CMD_DIRECT_WRITE) begin
              state <= S_WDATA;
            end else if (fsl_m_data[31:30] == CMD_TASK_ACCESS) begin
              id_task <= fsl_m_data[29:26];
              request <= req_e'(fsl_m_data[25:23]);
              unique case (fsl_m_data[25:23])
                REQ_HEAP_STORE, REQ_STACK_PUSH: state <= S_TDATA;
                REQ_HEAP_LOAD, REQ_STACK_PULL:  active_spm_handler <= 1'b1;
                default: ;
              endcase
            end
          end
          S_WDATA: begin
            data_to_spm <= fsl_m_data;
            state       <= S_WADDR;
          end
          S_WADDR: begin
            address_to_spm <= fsl_m_data;
            if (in_spm(fsl_m_data)) begin
              write_spm_active <= 1'b1;
            end else begin
              request             <= REQ_REDIRECT;
              data_to_spm_handler <= fsl_m_data;
              active_spm_handler  <= 1'b1;
            end
            state <= S_INSTR;
          end
          S_TDATA: begin
            data_to_spm_handler <= fsl_m_data;
            active_spm_handler  <= 1'b1;
            state               <= S_INSTR;
          end
        endcase
      end
    end
  end
endmodule
