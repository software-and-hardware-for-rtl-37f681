// tb_dma_controller: the DMA controller between a small SPM block RAM (port A)
// and a DRAM model with wait states. Checks the three branches of the DMA
// chart (to the SPM when it is not full; SPM to backup storage when the SPM
// is full; SPM to backup storage when asked), the bus request/grant
// handshake (nothing moves before dgrant), the release of dreq with the done
// pulse, the copied data, and the cycle count per word.
module tb_dma_controller;
  localparam int unsigned WAITS = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, start, to_spm, spm_not_full, busy, done, to_bs, dreq, dgrant;
  logic [31:0] spm_addr, dram_addr;
  logic [15:0] len_words;
  logic        spm_en, dram_req, dram_we, dram_ack;
  logic [3:0]  spm_we;
  logic [31:0] spm_a, spm_wdata, spm_rdata, dram_a, dram_wdata, dram_rdata;
  logic        pa_en, tb_en;
  logic [3:0]  pa_we, tb_we;
  logic [31:0] pa_addr, pa_wdata, tb_addr, tb_wdata;
  logic [31:0] rdb;

  dma_controller dut (.*);
  dram_model #(.WORDS(512), .WAIT(WAITS)) dram (
    .clk, .rst, .req(dram_req), .we(dram_we), .addr(dram_a), .wdata(dram_wdata), .ack(dram_ack), .rdata(dram_rdata));
  // port A is the DMA's while it holds the grant, the testbench's otherwise
  assign pa_en    = dgrant ? spm_en    : tb_en;
  assign pa_we    = dgrant ? spm_we    : tb_we;
  assign pa_addr  = dgrant ? spm_a     : tb_addr;
  assign pa_wdata = dgrant ? spm_wdata : tb_wdata;
  spm_bram #(.BYTES(4096)) ram (
    .clk_a(clk), .en_a(pa_en), .we_a(pa_we), .addr_a(pa_addr), .wdata_a(pa_wdata), .rdata_a(spm_rdata),
    .clk_b(clk), .en_b(1'b0), .we_b(4'h0), .addr_b(32'h0), .wdata_b(32'h0), .rdata_b(rdb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic spm_write(int w, logic [31:0] d);
    @(negedge clk); tb_en = 1; tb_we = 4'hF; tb_addr = 32'h8A22_0000 + 4*w; tb_wdata = d;
    @(negedge clk); tb_en = 0; tb_we = 0;
  endtask
  task automatic spm_read(int w, output logic [31:0] d);
    @(negedge clk); tb_en = 1; tb_we = 0; tb_addr = 32'h8A22_0000 + 4*w;
    @(negedge clk); tb_en = 0; d = spm_rdata;
  endtask

  int ncyc;
  task automatic transfer(bit ts, bit nf, int sw, int dw, int len, int grant_delay, bit exp_bs);
    int dones = 0;
    @(negedge clk);
    start = 1; to_spm = ts; spm_not_full = nf; len_words = 16'(len);
    spm_addr = 32'h8A22_0000 + 4*sw; dram_addr = 32'h9000_0000 + 4*dw;
    @(negedge clk); start = 0;
    for (int k = 0; k < grant_delay; k++) begin
      check(dreq && !spm_en && !dram_req, "bus requested, nothing moves before the grant");
      @(negedge clk);
    end
    dgrant = 1; ncyc = 0;
    while (dreq && ncyc < 10000) begin @(negedge clk); ncyc++; if (done) dones++; end
    dgrant = 0;
    check(to_bs == exp_bs, $sformatf("direction: to_bs=%0d expected %0d", to_bs, exp_bs));
    check(dones == 1, "one done pulse on release");
    // per word: DRAM access (WAITS+2 cycles) + one SPM step (+1 more for an SPM read)
    check(ncyc == len * (WAITS + 2 + (exp_bs ? 2 : 1)) + 1,
          $sformatf("%0d words took %0d cycles", len, ncyc));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [31:0] img [64];
    rst = 1; start = 0; to_spm = 0; spm_not_full = 0; spm_addr = 0; dram_addr = 0; len_words = 0;
    dgrant = 0; tb_en = 0; tb_we = 0; tb_addr = 0; tb_wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // put a block into DRAM by way of the SPM: SPM -> BS
    for (int i = 0; i < 64; i++) begin img[i] = $urandom; spm_write(i, img[i]); end
    transfer(0, 1, 0, 16, 64, 3, 1);
    for (int i = 0; i < 64; i++) check(dram.mem[16 + i] == img[i], $sformatf("BS word %0d", i));
    // main memory -> SPM when the SPM is not full
    transfer(1, 1, 200, 16, 64, 0, 0);
    for (int i = 0; i < 64; i++) begin spm_read(200 + i, d); check(d == img[i], $sformatf("SPM word %0d", 200 + i)); end
    // towards the SPM but the SPM is full: copies SPM -> BS instead
    for (int i = 0; i < 8; i++) spm_write(500 + i, ~img[i]);
    transfer(1, 0, 500, 300, 8, 5, 1);
    for (int i = 0; i < 8; i++) check(dram.mem[300 + i] == ~img[i], $sformatf("evicted word %0d", i));
    // random transfers
    for (int n = 0; n < 20; n++) begin
      int len = $urandom_range(1, 16);
      int sw = $urandom_range(0, 1000 - 16);
      int dw = $urandom_range(0, 512 - 16);
      bit ts = 1'($urandom), nf = 1'($urandom);
      logic [31:0] src [16];
      for (int i = 0; i < len; i++) begin
        src[i] = $urandom;
        if (ts && nf) dram.mem[dw + i] = src[i]; else spm_write(sw + i, src[i]);
      end
      transfer(ts, nf, sw, dw, len, $urandom_range(3), !(ts && nf));
      for (int i = 0; i < len; i++) begin
        if (ts && nf) begin spm_read(sw + i, d); check(d == src[i], "random to SPM"); end
        else check(dram.mem[dw + i] == src[i], "random to BS");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
