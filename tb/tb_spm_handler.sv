// tb_spm_handler: the SPM handler against a behavioural SPM port (answers one
// cycle after an access is taken, as the SPM interface does) and a reference
// model of the task operations. It replays the paper's worked example
// (task 1: profiler table entry 0x8A230004 -> profiler 0x8A231004, heap
// 0x8A22000F, stack 0x8A22005F, DRAM heap 0x900000FF, DRAM stack 0x900010EF;
// a heap load returns 0xCCCCDDDD, a store of 0xF2222222 moves the heap to
// 0x8A220013 and the DRAM heap to 0x90000103 and answers 0xAAAAAAAA), then the
// full-frame and out-of-SPM cases, then random operations on several tasks.
// Memory contents, response word, control bit and the cycle count from the
// active pulse to the response strobe are all checked.
module tb_spm_handler;
  import spm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, active, busy, read_data_spm, write_data_spm, data_exists_spm, write_spm_ack;
  logic        ctrl_to_cpu, write_data_cpu, cpu_busy;
  logic [3:0]  id_task;
  req_e        request;
  logic [31:0] data_from_cpu, address_to_spm, data_to_spm, data_from_spm, data_to_cpu;
  logic [31:0] profiler_address, heap_curr_ptr_spm, stak_curr_ptr_spm, heap_curr_ptr_dram, stak_curr_ptr_dram;

  spm_handler dut (.*);

  // behavioural SPM port: word memory keyed by address[31:2]
  logic [31:0] mem [logic [29:0]];
  logic [31:0] refm [logic [29:0]];
  logic pend;
  always @(posedge clk) begin
    if (rst) begin
      pend <= 0; data_exists_spm <= 0; write_spm_ack <= 0;
    end else begin
      data_exists_spm <= 0; write_spm_ack <= 0; pend <= 0;
      if (!pend && (read_data_spm || write_data_spm)) begin
        pend <= 1;
        if (write_data_spm) begin
          mem[address_to_spm[31:2]] = data_to_spm;
          write_spm_ack <= 1;
        end else begin
          data_from_spm <= mem.exists(address_to_spm[31:2]) ? mem[address_to_spm[31:2]] : 32'h0;
          data_exists_spm <= 1;
        end
      end
    end
  end

  // cycle stamps and the response
  int cycle, t_active, t_resp;
  logic [31:0] got; logic got_ctrl; bit got_any;
  always @(posedge clk) begin
    cycle++;
    if (active) t_active = cycle;
    if (write_data_cpu) begin t_resp = cycle; got = data_to_cpu; got_ctrl = ctrl_to_cpu; got_any = 1; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] rd(logic [31:0] a);
    return refm.exists(a[31:2]) ? refm[a[31:2]] : 32'h0;
  endfunction
  function automatic void wr(logic [31:0] a, logic [31:0] d);
    refm[a[31:2]] = d; mem[a[31:2]] = d;
  endfunction
  function automatic bit in_spm(logic [31:0] a);
    return (a - 32'h8A22_0000) < 32'd131072;
  endfunction

  // reference: expected response, control, cycles; updates refm
  task automatic model(logic [3:0] t, req_e r, logic [31:0] d,
                       output logic [31:0] resp, output logic ctrl, output int cyc);
    logic [31:0] p, h, s, hd, sd, tg;
    if (r == REQ_REDIRECT) begin resp = d; ctrl = 0; cyc = 1; return; end
    p = rd(32'h8A23_0000 + 4*t);
    h = rd(p); s = rd(p + 4); hd = rd(p + 8); sd = rd(p + 12);
    ctrl = 1;
    case (r)
      REQ_HEAP_STORE: tg = h + 4;
      REQ_STACK_PUSH: tg = s - 4;
      REQ_STACK_PULL: tg = s;
      default:        tg = h;
    endcase
    if ((r == REQ_HEAP_STORE || r == REQ_STACK_PUSH) && !(h + 4 < s)) begin resp = RESP_FULL; cyc = 12; end
    else if (!in_spm(tg)) begin resp = tg; ctrl = 0; cyc = 12; end
    else case (r)
      REQ_HEAP_LOAD:  begin resp = rd(tg); cyc = 14; end
      REQ_HEAP_STORE: begin refm[tg[31:2]] = d; refm[p[31:2]] = h + 4; refm[(p + 8) >> 2] = hd + 4; resp = RESP_DMA_NEEDED; cyc = 18; end
      REQ_STACK_PUSH: begin refm[tg[31:2]] = d; refm[(p + 4) >> 2] = s - 4; refm[(p + 12) >> 2] = sd - 4; resp = RESP_DMA_NEEDED; cyc = 18; end
      default:        begin resp = rd(tg); refm[(p + 4) >> 2] = s + 4; refm[(p + 12) >> 2] = sd + 4; cyc = 18; end
    endcase
  endtask

  task automatic op(logic [3:0] t, req_e r, logic [31:0] d, int busy_cycles = 0);
    logic [31:0] eresp; logic ectrl; int ecyc; int waitc;
    model(t, r, d, eresp, ectrl, ecyc);
    @(negedge clk);
    while (busy) @(negedge clk);
    cpu_busy = busy_cycles > 0;
    active = 1; id_task = t; request = r; data_from_cpu = d; got_any = 0;
    @(negedge clk);
    active = 0; id_task = 4'($urandom); request = req_e'(3'($urandom)); data_from_cpu = $urandom;
    waitc = 0;
    while (!got_any && waitc < 100) begin
      if (waitc == busy_cycles - 1) cpu_busy = 0;
      @(negedge clk); waitc++;
    end
    check(got_any && got == eresp && got_ctrl == ectrl,
          $sformatf("task %0d req %0d: response %h/%0d expected %h/%0d", t, r, got, got_ctrl, eresp, ectrl));
    check(t_resp - t_active == (busy_cycles > ecyc ? busy_cycles : ecyc),
          $sformatf("task %0d req %0d: %0d cycles, expected %0d", t, r, t_resp - t_active, ecyc));
    @(negedge clk);
    check(!busy, "idle after the response");
  endtask

  task automatic compare_mem();
    foreach (refm[k]) begin
      checks++;
      if (!mem.exists(k) || mem[k] !== refm[k]) begin
        failures++; $display("FAIL: word %h is %h expected %h", {k, 2'b00}, mem.exists(k) ? mem[k] : 32'h0, refm[k]);
      end
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p;
    rst = 1; active = 0; cpu_busy = 0; id_task = 0; request = REQ_NONE; data_from_cpu = 0;
    data_from_spm = 0; cycle = 0;
    // the paper's example, task 1
    wr(32'h8A23_0004, 32'h8A23_1004);
    wr(32'h8A23_1004, 32'h8A22_000F);
    wr(32'h8A23_1008, 32'h8A22_005F);
    wr(32'h8A23_100C, 32'h9000_00FF);
    wr(32'h8A23_1010, 32'h9000_10EF);
    wr(32'h8A22_000F, 32'hCCCC_DDDD);
    repeat (3) @(negedge clk);
    rst = 0;
    op(1, REQ_HEAP_LOAD, 0);
    check(got == 32'hCCCC_DDDD, "paper example: heap load returns 0xCCCCDDDD");
    check(profiler_address == 32'h8A23_1004 && stak_curr_ptr_dram == 32'h9000_10EF, "profiler registers loaded");
    op(1, REQ_HEAP_STORE, 32'hF222_2222);
    check(mem[32'h8A22_0013 >> 2] == 32'hF222_2222, "store lands at 0x8A220013");
    check(mem[32'h8A23_1004 >> 2] == 32'h8A22_0013 && mem[32'h8A23_100C >> 2] == 32'h9000_0103, "heap pointers updated");
    op(1, REQ_STACK_PUSH, 32'h1234_5678);
    check(mem[32'h8A23_1008 >> 2] == 32'h8A22_005B && mem[32'h8A23_1010 >> 2] == 32'h9000_10EB, "stack pointers moved down by 4");
    op(1, REQ_STACK_PULL, 0);
    check(got == 32'h1234_5678, "pull returns the pushed word");
    op(1, REQ_HEAP_LOAD, 0, 25);   // processor slow to take the previous word
    // full frame: task 2, heap just below stack
    wr(32'h8A23_0008, 32'h8A23_2000);
    wr(32'h8A23_2000, 32'h8A22_0100); wr(32'h8A23_2004, 32'h8A22_0104);
    wr(32'h8A23_2008, 32'h9000_2000); wr(32'h8A23_200C, 32'h9000_3000);
    op(2, REQ_HEAP_STORE, 32'h5555_5555);
    check(got == RESP_FULL, "full frame on store");
    op(2, REQ_STACK_PUSH, 32'h5555_5555);
    check(got == RESP_FULL, "full frame on push");
    // task 3 points outside the SPM: redirected
    wr(32'h8A23_000C, 32'h8A23_3000);
    wr(32'h8A23_3000, 32'h9000_4000); wr(32'h8A23_3004, 32'h9000_8000);
    op(3, REQ_HEAP_LOAD, 0);
    check(got == 32'h9000_4000 && got_ctrl == 0, "out-of-SPM heap address sent back");
    op(0, REQ_REDIRECT, 32'h9123_4560);
    compare_mem();
    // random operations on tasks 4..9
    for (int t = 4; t < 10; t++) begin
      p = 32'h8A23_4000 + 32'h40 * t;
      wr(32'h8A23_0000 + 4*t, p);
      wr(p,      32'h8A22_1000 + 32'h400 * t);
      wr(p + 4,  32'h8A22_1000 + 32'h400 * t + 4 * $urandom_range(2, 12));
      wr(p + 8,  32'h9100_0000 + 32'h1000 * t);
      wr(p + 12, 32'h9200_0000 + 32'h1000 * t);
    end
    for (int n = 0; n < 600; n++) begin
      req_e r;
      case ($urandom_range(3))
        0: r = REQ_HEAP_LOAD;
        1: r = REQ_HEAP_STORE;
        2: r = REQ_STACK_PUSH;
        default: r = REQ_STACK_PULL;
      endcase
      op(4'($urandom_range(4, 9)), r, $urandom, $urandom_range(3) == 0 ? $urandom_range(30) : 0);
    end
    compare_mem();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
