// spm_handler (unit U2 of the SPM coprocessor): the automaton that serves a
// task's heap and stack in the SPM.
//
// On active_spm_handler it runs one request for task id_task:
//  1. Profiler load (five SPM reads). The entry PROFILER_TABLE + 4*TASK_ID
//     holds the address of the task's profiler (PROFILER_POINTER ->
//     PROFILER_ADDRESS). The profiler holds four byte addresses, read in this
//     order: +0 HEAP_CURR_PTR_SPM, +4 STAK_CURR_PTR_SPM, +8 HEAP_CURR_PTR_DRAM,
//     +12 STAK_CURR_PTR_DRAM (the last two are the task's backup storage in DRAM).
//  2. The access. The heap grows up and the stack grows down, 4 bytes a word.
//     - heap load : read the word at HEAP_CURR_PTR_SPM and send it to the CPU.
//     - heap store: if HEAP+4 < STACK, write the word at HEAP+4, then write back
//       HEAP_SPM+4 and HEAP_DRAM+4 into the profiler and send 0xAAAAAAAA (a DMA
//       copy SPM -> DRAM is needed). Otherwise send 0xEEEEEEEE (frame full).
//     - stack push: if HEAP < STACK-4, write the word at STACK-4, write back
//       STAK_SPM-4 and STAK_DRAM-4 and send 0xAAAAAAAA; otherwise 0xEEEEEEEE.
//     - stack pull: read the word at STACK, write back STAK_SPM+4 and
//       STAK_DRAM+4, and send the word.
//     An access address outside the SPM window is not performed: the address
//     is sent back to the CPU with the control bit low, so that the operating
//     system can serve it from the next memory level. A REQ_REDIRECT from the
//     decoder (direct write outside the SPM) is sent back the same way.
//  3. The response goes to the CPU interface (write_data_cpu strobe) once that
//     interface is free; data words and codes carry the control bit high.
// Every SPM access goes through the SPM interface and takes two cycles. With
// the CPU interface free, the write_data_cpu strobe of a heap load comes
// 5*2 + 1 + 2 + 1 = 14 cycles after the active pulse; a stack pull, or a store
// or push that is performed, adds two pointer write-backs (18); a full frame
// or a redirected address takes 12, and a REQ_REDIRECT from the decoder 1.
// The profiler layout, the table base address (taken from the paper's
// example), the pointer updates, the two codes and the heap-below-stack test
// are the paper's. The REQUEST codes other than heap load and heap store,
// the test on the pointers
// after the move (so a store never overwrites the top of the stack), the pull
// updates and the redirection by the control bit are this design's choices.
module spm_handler
  import spm_pkg::*;
#(
  parameter logic [31:0] SPM_BASE       = SPM_BASE_DEFAULT,
  parameter int unsigned SPM_BYTES      = 131072,
  parameter logic [31:0] PROFILER_TABLE = PROFILER_TABLE_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  // from the instruction decoder
  input  logic        active,
  input  logic [3:0]  id_task,
  input  req_e        request,
  input  logic [31:0] data_from_cpu,
  output logic        busy,
  // towards the SPM interface
  output logic [31:0] address_to_spm,
  output logic [31:0] data_to_spm,
  output logic        read_data_spm,
  output logic        write_data_spm,
  input  logic [31:0] data_from_spm,
  input  logic        data_exists_spm,
  input  logic        write_spm_ack,
  // towards the CPU interface
  output logic [31:0] data_to_cpu,
  output logic        ctrl_to_cpu,
  output logic        write_data_cpu,
  input  logic        cpu_busy,
  // profiler registers, visible for observation
  output logic [31:0] profiler_address,
  output logic [31:0] heap_curr_ptr_spm,
  output logic [31:0] stak_curr_ptr_spm,
  output logic [31:0] heap_curr_ptr_dram,
  output logic [31:0] stak_curr_ptr_dram
);
  typedef enum logic [3:0] {
    S_IDLE, S_RD_TABLE, S_RD_HEAP, S_RD_STACK, S_RD_HEAPD, S_RD_STACKD,
    S_EXEC, S_ACCESS, S_WB_SPM, S_WB_DRAM, S_RESP
  } state_e;

  state_e      state;
  req_e        req_r;
  logic [3:0]  tid_r;
  logic [31:0] data_r;      // word from the CPU (store, push) or from the SPM (load, pull)
  logic [31:0] target;      // address of the heap/stack word
  logic [31:0] resp;
  logic        resp_ctrl;

  function automatic logic in_spm(logic [31:0] a);
    return (a - SPM_BASE) < 32'(SPM_BYTES);
  endfunction

  // Write-back of the pointers after a store, push or pull.
  logic [31:0] wb_spm_off, wb_spm_val, wb_dram_off, wb_dram_val;
  always_comb begin
    wb_spm_off  = OFF_HEAP_SPM;
    wb_spm_val  = heap_curr_ptr_spm + 32'd4;
    wb_dram_off = OFF_HEAP_DRAM;
    wb_dram_val = heap_curr_ptr_dram + 32'd4;
    unique case (req_r)
      REQ_STACK_PUSH: begin
        wb_spm_off  = OFF_STACK_SPM;
        wb_spm_val  = stak_curr_ptr_spm - 32'd4;
        wb_dram_off = OFF_STACK_DRAM;
        wb_dram_val = stak_curr_ptr_dram - 32'd4;
      end
      REQ_STACK_PULL: begin
        wb_spm_off  = OFF_STACK_SPM;
        wb_spm_val  = stak_curr_ptr_spm + 32'd4;
        wb_dram_off = OFF_STACK_DRAM;
        wb_dram_val = stak_curr_ptr_dram + 32'd4;
      end
      default: ;
    endcase
  end

  // Requests towards the SPM interface, held until answered.
  always_comb begin
    read_data_spm  = 1'b0;
    write_data_spm = 1'b0;
    address_to_spm = '0;
    data_to_spm    = '0;
    unique case (state)
      S_RD_TABLE:  begin read_data_spm = 1'b1; address_to_spm = PROFILER_TABLE + {26'd0, tid_r, 2'b00}; end
      S_RD_HEAP:   begin read_data_spm = 1'b1; address_to_spm = profiler_address + OFF_HEAP_SPM;   end
      S_RD_STACK:  begin read_data_spm = 1'b1; address_to_spm = profiler_address + OFF_STACK_SPM;  end
      S_RD_HEAPD:  begin read_data_spm = 1'b1; address_to_spm = profiler_address + OFF_HEAP_DRAM;  end
      S_RD_STACKD: begin read_data_spm = 1'b1; address_to_spm = profiler_address + OFF_STACK_DRAM; end
      S_ACCESS: begin
        address_to_spm = target;
        data_to_spm    = data_r;
        if (req_r == REQ_HEAP_STORE || req_r == REQ_STACK_PUSH) write_data_spm = 1'b1;
        else                                                     read_data_spm  = 1'b1;
      end
      S_WB_SPM:  begin write_data_spm = 1'b1; address_to_spm = profiler_address + wb_spm_off;  data_to_spm = wb_spm_val;  end
      S_WB_DRAM: begin write_data_spm = 1'b1; address_to_spm = profiler_address + wb_dram_off; data_to_spm = wb_dram_val; end
      default: ;
    endcase
  end

  assign busy           = (state != S_IDLE);
  assign write_data_cpu = (state == S_RESP) && !cpu_busy;
  assign data_to_cpu    = resp;
  assign ctrl_to_cpu    = resp_ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      state              <= S_IDLE;
      req_r              <= REQ_NONE;
      tid_r              <= '0;
      data_r             <= '0;
      target             <= '0;
      resp               <= '0;
      resp_ctrl          <= 1'b0;
      profiler_address   <= '0;
      heap_curr_ptr_spm  <= '0;
      stak_curr_ptr_spm  <= '0;
      heap_curr_ptr_dram <= '0;
      stak_curr_ptr_dram <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (active) begin
          req_r  <= request;
          tid_r  <= id_task;
          data_r <= data_from_cpu;
          if (request == REQ_REDIRECT) begin
            resp      <= data_from_cpu;
            resp_ctrl <= 1'b0;
            state     <= S_RESP;
          end else begin
            state <= S_RD_TABLE;
          end
        end
        S_RD_TABLE:  if (data_exists_spm) begin profiler_address   <= data_from_spm; state <= S_RD_HEAP;   end
        S_RD_HEAP:   if (data_exists_spm) begin heap_curr_ptr_spm  <= data_from_spm; state <= S_RD_STACK;  end
        S_RD_STACK:  if (data_exists_spm) begin stak_curr_ptr_spm  <= data_from_spm; state <= S_RD_HEAPD;  end
        S_RD_HEAPD:  if (data_exists_spm) begin heap_curr_ptr_dram <= data_from_spm; state <= S_RD_STACKD; end
        S_RD_STACKD: if (data_exists_spm) begin stak_curr_ptr_dram <= data_from_spm; state <= S_EXEC;      end
        S_EXEC: begin
          logic [31:0] t;
          logic        room;
          unique case (req_r)
            REQ_HEAP_STORE: t = heap_curr_ptr_spm + 32'd4;
            REQ_STACK_PUSH: t = stak_curr_ptr_spm - 32'd4;
            REQ_STACK_PULL: t = stak_curr_ptr_spm;
            default:        t = heap_curr_ptr_spm;
          endcase
          room   = (heap_curr_ptr_spm + 32'd4) < stak_curr_ptr_spm;
          target <= t;
          resp_ctrl <= 1'b1;
          if ((req_r == REQ_HEAP_STORE || req_r == REQ_STACK_PUSH) && !room) begin
            resp  <= RESP_FULL;
            state <= S_RESP;
          end else if (!in_spm(t)) begin
            resp      <= t;
            resp_ctrl <= 1'b0;
            state     <= S_RESP;
          end else begin
            state <= S_ACCESS;
          end
        end
        S_ACCESS: begin
          if (data_exists_spm) begin
            data_r <= data_from_spm;
            resp   <= data_from_spm;
            state  <= (req_r == REQ_STACK_PULL) ? S_WB_SPM : S_RESP;
          end else if (write_spm_ack) begin
            resp  <= RESP_DMA_NEEDED;
            state <= S_WB_SPM;
          end
        end
        S_WB_SPM: if (write_spm_ack) begin
          if (req_r == REQ_HEAP_STORE) heap_curr_ptr_spm <= wb_spm_val;
          else                         stak_curr_ptr_spm <= wb_spm_val;
          state <= S_WB_DRAM;
        end
        S_WB_DRAM: if (write_spm_ack) begin
          if (req_r == REQ_HEAP_STORE) heap_curr_ptr_dram <= wb_dram_val;
          else                         stak_curr_ptr_dram <= wb_dram_val;
          state <= S_RESP;
        end
        S_RESP: if (!cpu_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
