// spm_pkg: encodings shared by the SPM coprocessor (SPM_IP) and its testbenches.
//
// The coprocessor gets 32-bit words from the MicroBlaze over a Direct Fast
// Simplex Link (DFSL). The first word of each request is an instruction word:
//   [31:30] CMD      00 = direct write into the SPM (then a data word and an address word)
//                    11 = task access through the task's profiler (TAS)
//   [29:26] TASK_ID  task identifier, indexes the table of profiler addresses
//   [25:23] REQUEST  what to do in that task's heap or stack
// CMD 00 and 11, TASK_ID 0001 and REQUEST 001 (heap load) come from the
// paper's simulations; the bit positions and the other REQUEST codes are
// this design's choice. Bit 31 here is bit 0 of the Xilinx FSL_M_Data(0:31) bus.
//
// Response words the coprocessor sends back (FSL_S_Data):
//   0xAAAAAAAA  a word was stored or pushed: a DMA copy SPM -> DRAM is needed
//   0xEEEEEEEE  the task's heap and stack have met: the frame is full
// Both codes are the paper's.
package spm_pkg;

  typedef enum logic [1:0] {
    CMD_DIRECT_WRITE = 2'b00,
    CMD_TASK_ACCESS  = 2'b11
  } cmd_e;

  typedef enum logic [2:0] {
    REQ_NONE       = 3'b000,
    REQ_HEAP_LOAD  = 3'b001,
    REQ_HEAP_STORE = 3'b010,
    REQ_STACK_PUSH = 3'b011,
    REQ_STACK_PULL = 3'b100,
    REQ_REDIRECT   = 3'b111   // internal: out-of-SPM direct write handed back to the CPU
  } req_e;

  localparam logic [31:0] RESP_DMA_NEEDED = 32'hAAAA_AAAA;
  localparam logic [31:0] RESP_FULL       = 32'hEEEE_EEEE;

  // Byte address window of the SPM seen by the coprocessor: 128 KB at 0x8A22_0000.
  localparam logic [31:0] SPM_BASE_DEFAULT       = 32'h8A22_0000;
  // Table of profiler addresses (register "outset address of profilers").
  localparam logic [31:0] PROFILER_TABLE_DEFAULT = 32'h8A23_0000;

  // Offsets of the four pointers inside one task profiler.
  localparam logic [31:0] OFF_HEAP_SPM   = 32'h0;
  localparam logic [31:0] OFF_STACK_SPM  = 32'h4;
  localparam logic [31:0] OFF_HEAP_DRAM  = 32'h8;
  localparam logic [31:0] OFF_STACK_DRAM = 32'hC;

  function automatic logic [31:0] make_instr(cmd_e cmd, logic [3:0] tid, req_e req);
    return {cmd, tid, req, 23'h0};
  endfunction

endpackage
