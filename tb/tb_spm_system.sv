// tb_spm_system: end-to-end run of the SPM subsystem at its full size
// (128 KB SPM, default parameters). The testbench plays the processor and
// its operating system: it sets up task profilers over the bus (port A),
// loads a task's data from DRAM into the SPM by DMA, serves the tasks' heap
// and stack requests over the Direct FSL link, and answers every 0xAAAAAAAA
// from the coprocessor with a DMA copy of the new word into the task's
// backup storage in DRAM, so that the DRAM copy follows the SPM. It checks
// responses, SPM and DRAM contents, and counts each mechanism of the design;
// a mechanism that never happened counts as a failure.
module tb_spm_system;
  import spm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, fsl_m_control, fsl_m_write, fsl_m_full, fsl_s_control, fsl_s_exists, fsl_s_read, interrupt;
  logic [31:0] fsl_m_data, fsl_s_data;
  logic        plb_bram_en;
  logic [3:0]  plb_bram_we;
  logic [31:0] plb_bram_addr, plb_bram_wdata, plb_bram_rdata;
  logic        dma_start, dma_to_spm, dma_spm_not_full, dma_busy, dma_done, dma_to_bs, dreq, dgrant;
  logic [31:0] dma_spm_addr, dma_dram_addr;
  logic [15:0] dma_len_words;
  logic        dram_req, dram_we, dram_ack;
  logic [31:0] dram_addr, dram_wdata, dram_rdata;

  spm_system dut (.*);
  dram_model #(.WORDS(8192), .WAIT(3)) dram (
    .clk, .rst, .req(dram_req), .we(dram_we), .addr(dram_addr), .wdata(dram_wdata), .ack(dram_ack), .rdata(dram_rdata));

  // mechanism counters
  typedef enum int {
    M_DIRECT_WRITE, M_DIRECT_REDIRECT, M_HEAP_LOAD, M_HEAP_STORE, M_PUSH, M_PULL, M_FULL,
    M_TASK_REDIRECT, M_FSL_BACKPRESSURE, M_DMA_TO_SPM, M_DMA_TO_BS, M_DMA_FULL_TO_BS,
    M_GRANT_WAIT, M_BUS_ACCESS, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"direct write", "direct write redirected", "heap load", "heap store",
    "stack push", "stack pull", "frame full", "task address redirected", "FSL back-pressure",
    "DMA DRAM to SPM", "DMA SPM to BS", "DMA to SPM refused, SPM to BS", "DMA waits for grant", "bus access to SPM"};

  always @(posedge clk) begin
    if (fsl_m_write && fsl_m_full) mech[M_FSL_BACKPRESSURE]++;
    if (dreq && !dgrant) mech[M_GRANT_WAIT]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- processor bus (port A) ----
  task automatic bus_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); plb_bram_en = 1; plb_bram_we = 4'hF; plb_bram_addr = a; plb_bram_wdata = d;
    @(negedge clk); plb_bram_en = 0; plb_bram_we = 0;
    mech[M_BUS_ACCESS]++;
  endtask
  task automatic bus_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); plb_bram_en = 1; plb_bram_we = 0; plb_bram_addr = a;
    @(negedge clk); plb_bram_en = 0; d = plb_bram_rdata;
    mech[M_BUS_ACCESS]++;
  endtask

  // ---- FSL ----
  task automatic send(logic [31:0] w);
    @(negedge clk);
    fsl_m_data = w; fsl_m_write = 1;
    @(posedge clk);
    while (fsl_m_full) @(posedge clk);
    @(negedge clk);
    fsl_m_write = 0;
  endtask
  task automatic recv(output logic [31:0] w, output logic c);
    int k = 0;
    while (!fsl_s_exists && k < 500) begin @(negedge clk); k++; end
    check(fsl_s_exists && interrupt, "response with interrupt");
    w = fsl_s_data; c = fsl_s_control;
    fsl_s_read = 1;
    @(negedge clk);
    fsl_s_read = 0;
  endtask

  // ---- DMA, as the operating system starts it ----
  task automatic dma(bit to_spm, bit not_full, logic [31:0] sa, logic [31:0] da, int len, int grant_delay);
    int k = 0;
    @(negedge clk);
    dma_start = 1; dma_to_spm = to_spm; dma_spm_not_full = not_full;
    dma_spm_addr = sa; dma_dram_addr = da; dma_len_words = 16'(len);
    @(negedge clk); dma_start = 0;
    repeat (grant_delay) @(negedge clk);
    check(dreq, "DMA requests the buses");
    dgrant = 1;
    while (!dma_done && k < 100000) begin @(negedge clk); k++; end
    check(dma_done && !dreq, "DMA releases the buses and signals the OS");
    if (dma_to_bs && to_spm) mech[M_DMA_FULL_TO_BS]++;
    else if (dma_to_bs)     mech[M_DMA_TO_BS]++;
    else                    mech[M_DMA_TO_SPM]++;
    @(negedge clk); dgrant = 0;
  endtask

  function automatic logic [31:0] dram_word(logic [31:0] a);
    return dram.mem[((a - 32'h9000_0000) >> 2) % 8192];
  endfunction

  // ---- a task operation with the OS answer to 0xAAAAAAAA ----
  logic [31:0] prof [16];
  task automatic task_op(logic [3:0] t, req_e r, logic [31:0] d, output logic [31:0] w, output logic c);
    logic [31:0] hp, sp, hd, sd;
    send(make_instr(CMD_TASK_ACCESS, t, r));
    if (r == REQ_HEAP_STORE || r == REQ_STACK_PUSH) send(d);
    recv(w, c);
    if (!c) begin mech[M_TASK_REDIRECT]++; return; end
    if (w == RESP_FULL) begin mech[M_FULL]++; return; end
    case (r)
      REQ_HEAP_LOAD:  mech[M_HEAP_LOAD]++;
      REQ_HEAP_STORE: mech[M_HEAP_STORE]++;
      REQ_STACK_PUSH: mech[M_PUSH]++;
      default:        mech[M_PULL]++;
    endcase
    if (w == RESP_DMA_NEEDED) begin
      // copy the new word to the task's backup storage
      bus_read(prof[t],      hp); bus_read(prof[t] + 4,  sp);
      bus_read(prof[t] + 8,  hd); bus_read(prof[t] + 12, sd);
      if (r == REQ_HEAP_STORE) dma(0, 1, hp, hd & ~32'h3, 1, 1);
      else                     dma(0, 1, sp, sd & ~32'h3, 1, 1);
      check(dram_word(r == REQ_HEAP_STORE ? hd : sd) == d, "backup storage follows the SPM");
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, d; logic c;
    logic [31:0] blk [32];
    rst = 1; fsl_m_control = 0; fsl_m_write = 0; fsl_m_data = 0; fsl_s_read = 0;
    plb_bram_en = 0; plb_bram_we = 0; plb_bram_addr = 0; plb_bram_wdata = 0;
    dma_start = 0; dma_to_spm = 0; dma_spm_not_full = 0; dma_spm_addr = 0; dma_dram_addr = 0; dma_len_words = 0;
    dgrant = 0;
    foreach (mech[i]) mech[i] = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    // task 1 set up with direct writes over FSL (the paper's values), tasks 2..5 over the bus
    prof[1] = 32'h8A23_1004;
    send(32'h0FFF_FFFF); send(32'h8A23_1004); send(32'h8A23_0004); mech[M_DIRECT_WRITE]++;
    send(32'h0FFF_FFFF); send(32'h8A22_000F); send(32'h8A23_1004); mech[M_DIRECT_WRITE]++;
    send(32'h0FFF_FFFF); send(32'h8A22_005F); send(32'h8A23_1008); mech[M_DIRECT_WRITE]++;
    send(32'h0FFF_FFFF); send(32'h9000_00FF); send(32'h8A23_100C); mech[M_DIRECT_WRITE]++;
    send(32'h0FFF_FFFF); send(32'h9000_10EF); send(32'h8A23_1010); mech[M_DIRECT_WRITE]++;
    for (int t = 2; t <= 5; t++) begin
      prof[t] = 32'h8A23_2000 + 32'h20 * t;
      bus_write(32'h8A23_0000 + 4*t, prof[t]);
      bus_write(prof[t],      32'h8A22_4000 + 32'h1000 * t - 4);   // heap: empty, grows up
      bus_write(prof[t] + 4,  32'h8A22_4000 + 32'h1000 * t + 32'h80); // stack: 32 words above
      bus_write(prof[t] + 8,  32'h9000_4000 + 32'h1000 * t - 4);
      bus_write(prof[t] + 12, 32'h9000_4000 + 32'h1000 * t + 32'h80);
    end
    // DRAM -> SPM: task 1's heap data arrives by DMA, then is read by a heap load
    for (int i = 0; i < 32; i++) begin blk[i] = $urandom; dram.mem[16 + i] = blk[i]; end
    dma(1, 1, 32'h8A22_000C, 32'h9000_0040, 32, 4);
    check(!dma_to_bs, "DMA to the SPM when it is not full");
    task_op(1, REQ_HEAP_LOAD, 0, w, c);
    check(w == blk[0] && c, "heap load reads the word brought in by DMA");
    task_op(1, REQ_HEAP_STORE, 32'hF222_2222, w, c);
    check(w == RESP_DMA_NEEDED, "store answered 0xAAAAAAAA");
    bus_read(32'h8A23_1004, d); check(d == 32'h8A22_0013, "HEAP_CURR_PTR_SPM 0x8A220013");
    bus_read(32'h8A23_100C, d); check(d == 32'h9000_0103, "HEAP_CURR_PTR_DRAM 0x90000103");
    // random mix on tasks 1..5 until every task has met a full frame
    for (int n = 0; n < 400; n++) begin
      logic [3:0] t = 4'($urandom_range(1, 5));
      req_e r;
      case ($urandom_range(5))
        0: r = REQ_HEAP_LOAD;
        1, 2: r = REQ_HEAP_STORE;
        3, 4: r = REQ_STACK_PUSH;
        default: r = REQ_STACK_PULL;
      endcase
      d = $urandom;
      task_op(t, r, d, w, c);
      if (r == REQ_STACK_PUSH && w == RESP_DMA_NEEDED) begin
        task_op(t, REQ_STACK_PULL, 0, w, c);
        check(w == d, "pull returns the word just pushed");
        task_op(t, REQ_STACK_PUSH, d, w, c);
      end
    end
    // the SPM is full: a DMA towards it copies SPM to BS instead
    dma(1, 0, 32'h8A22_000C, 32'h9000_1000, 8, 2);
    check(dma_to_bs, "DMA to a full SPM evicts to BS");
    for (int i = 0; i < 8; i++) begin
      bus_read(32'h8A22_000C + 4*i, d);
      check(dram_word(32'h9000_1000 + 4*i) == d, "evicted words in DRAM");
    end
    // out of the SPM
    send(32'h0FFF_FFFF); send(32'h5555_0000); send(32'h9000_0800);
    recv(w, c);
    check(w == 32'h9000_0800 && !c, "direct write outside the SPM sent back");
    mech[M_DIRECT_REDIRECT]++;
    bus_write(32'h8A23_0000 + 4*7, 32'h8A23_3000);
    bus_write(32'h8A23_3000, 32'h9000_0600); bus_write(32'h8A23_3004, 32'h9000_0900);
    prof[7] = 32'h8A23_3000;
    task_op(7, REQ_HEAP_LOAD, 0, w, c);
    check(w == 32'h9000_0600 && !c, "task heap outside the SPM sent back");
    // two requests back to back: the second waits behind fsl_m_full
    prof[6] = 32'h8A23_2400;
    bus_write(32'h8A23_0000 + 4*6, prof[6]);
    bus_write(prof[6], 32'h8A22_9000); bus_write(prof[6] + 4, 32'h8A22_9100);
    bus_write(prof[6] + 8, 32'h9000_9000); bus_write(prof[6] + 12, 32'h9000_9100);
    task_op(6, REQ_STACK_PUSH, 32'h600D_CAFE, w, c);
    send(make_instr(CMD_TASK_ACCESS, 4'd6, REQ_STACK_PULL));
    send(make_instr(CMD_TASK_ACCESS, 4'd6, REQ_STACK_PULL));
    recv(w, c);
    check(w == 32'h600D_CAFE, "first of two queued requests");
    recv(w, c);
    check(c, "second of two queued requests answered");
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-32s happened %0d times", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
