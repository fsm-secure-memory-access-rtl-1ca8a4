// tb_smac_top: end-to-end test of the secure memory access design at its
// default size (1K x 16 block RAM), driven only through the two GPIO
// registers, as the processor's program would drive it.
//
// The host model follows the program side of the protocol: check ready,
// set load_unload and raise start; for each word wait for stopped, put the
// data on GPIO_Ins[15:0] (or take it from GPIO_Outs[15:0]) and raise
// continue, wait for stopped to fall, drop continue. Its delays are random.
// It keeps its own copy of what the memory should hold and checks every
// unloaded word against it, and checks the timing of every handshake step.
//
// Operations: the whole memory is loaded and unloaded; windows set by the
// PL-side address inputs are loaded and then the whole memory is unloaded
// to show nothing outside the window changed; a window that wraps past the
// last address; early exits through 'done' from load_mem, unload_mem and
// wait_load_unload; a reset through RESET_EXT in mid-transfer. Each of
// these mechanisms is counted and one that never happened counts as a
// failure.
module tb_smac_top;
  import smac_pkg::*;
  localparam int unsigned AW = SMAC_ADDR_W;
  localparam int unsigned N  = 2**AW;

  logic              clk = 1'b0;
  logic [GPIO_W-1:0] GPIO_Ins, GPIO_Outs;
  logic [AW-1:0]     base_address, upper_limit;

  int checks = 0, failures = 0;
  logic [SMAC_DATA_W-1:0] host_view [N];
  bit   host_known [N];

  // mechanism counters
  int n_load_words = 0, n_unload_words = 0, n_busy_wait = 0, n_wait_cont_low = 0;
  int n_upper_limit = 0, n_done_load = 0, n_done_unload = 0, n_done_wait = 0;
  int n_reset = 0, n_wrap = 0;

  smac_top dut (.*);

  always #5 clk = ~clk;

  wire ready   = GPIO_Outs[GO_READY];
  wire stopped = GPIO_Outs[GO_STOPPED];
  wire [SMAC_DATA_W-1:0] dout = GPIO_Outs[SMAC_DATA_W-1:0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unused GPIO_Outs bits stay zero
  always @(negedge clk)
    check(GPIO_Outs[30:29] == '0 && GPIO_Outs[27:16] == '0, "unused GPIO_Outs bits zero");

  task automatic start_op(input bit lu, input int base, input int upper);
    check(ready === 1'b1 && stopped === 1'b0, "ready before start");
    base_address = AW'(base);
    upper_limit  = AW'(upper);
    GPIO_Ins[GI_LOAD_UNLOAD] = lu;
    GPIO_Ins[GI_START] = 1'b1;
    @(negedge clk);
    GPIO_Ins[GI_START] = 1'b0;
    check(ready === 1'b0 && stopped === 1'b1, "stopped one clock after start");
  endtask

  task automatic one_word(input bit lu, input int addr, input bit last);
    logic [SMAC_DATA_W-1:0] w;
    int d;
    check(stopped === 1'b1, "stopped up for a word");
    if (lu) begin
      if (host_known[addr])
        check(dout == host_view[addr],
              $sformatf("unload %0d: got %h want %h", addr, dout, host_view[addr]));
      n_unload_words++;
    end
    d = $urandom_range(0, 2);
    if (d > 0) n_busy_wait++;
    repeat (d) begin
      @(negedge clk);
      check(stopped === 1'b1, "stopped held");
    end
    w = SMAC_DATA_W'($urandom);
    // data and continue in the same register write
    if (!lu) GPIO_Ins[SMAC_DATA_W-1:0] = w;
    GPIO_Ins[GI_CONTINUE] = 1'b1;
    @(negedge clk);
    check(stopped === 1'b0, "stopped falls one clock after continue");
    if (!lu) begin
      host_view[addr]  = w;
      host_known[addr] = 1'b1;
      n_load_words++;
    end
    d = $urandom_range(0, 2);
    if (d > 0) n_wait_cont_low++;
    repeat (d) @(negedge clk);
    GPIO_Ins[GI_CONTINUE] = 1'b0;
    @(negedge clk);
    if (last) begin
      check(ready === 1'b1, "idle one clock after the last word");
      n_upper_limit++;
    end else begin
      check(stopped === 1'b1, "next word one clock after continue low");
    end
  endtask

  task automatic transfer(input bit lu, input int base, input int upper);
    int n;
    n = ((upper - base) % N + N) % N + 1;
    if (upper < base) n_wrap++;
    start_op(lu, base, upper);
    for (int i = 0; i < n; i++) one_word(lu, (base + i) % N, i == n - 1);
  endtask

  task automatic end_with_done();
    @(negedge clk);
    check(ready === 1'b0 && stopped === 1'b0, "waiting for done to fall");
    GPIO_Ins[GI_DONE] = 1'b0;
    @(negedge clk);
    check(ready === 1'b1, "idle after done falls");
  endtask

  initial begin
    GPIO_Ins = '0;
    GPIO_Ins[GI_RESET_EXT] = 1'b1;
    base_address = '0; upper_limit = '0;
    for (int i = 0; i < N; i++) host_known[i] = 1'b0;
    repeat (3) @(negedge clk);
    GPIO_Ins[GI_RESET_EXT] = 1'b0;
    @(negedge clk);
    check(ready === 1'b1 && stopped === 1'b0, "idle after RESET_EXT");
    n_reset++;

    // one complete load and unload of the whole memory
    transfer(1'b0, 0, N - 1);
    transfer(1'b1, 0, N - 1);

    // restricted windows: only the window changes
    transfer(1'b0, 100, 163);
    transfer(1'b0, N - 8, 7);        // wraps past the last address
    transfer(1'b1, 0, N - 1);
    transfer(1'b1, 150, 150);

    // done before any word is written
    start_op(1'b0, 200, 300);
    GPIO_Ins[GI_DONE] = 1'b1;
    end_with_done();
    n_done_load++;

    // done while unloading
    start_op(1'b1, 200, 300);
    check(dout == host_view[200], "word shown before done");
    GPIO_Ins[GI_DONE] = 1'b1;
    end_with_done();
    n_done_unload++;

    // done between words: first word written, the rest untouched
    start_op(1'b0, 400, 410);
    GPIO_Ins[SMAC_DATA_W-1:0] = 16'h1234;
    GPIO_Ins[GI_CONTINUE] = 1'b1;
    @(negedge clk);
    host_view[400] = 16'h1234;
    GPIO_Ins[GI_DONE] = 1'b1;
    @(negedge clk);
    GPIO_Ins[GI_CONTINUE] = 1'b0;
    end_with_done();
    n_done_wait++;

    // RESET_EXT in the middle of a load
    start_op(1'b0, 500, 520);
    GPIO_Ins[GI_RESET_EXT] = 1'b1;
    @(negedge clk);
    GPIO_Ins[GI_RESET_EXT] = 1'b0;
    check(ready === 1'b1 && stopped === 1'b0, "RESET_EXT returns to idle");
    n_reset++;

    // everything must read back as the host expects
    transfer(1'b1, 0, N - 1);

    check(n_load_words > 0,   "mechanism: load");
    check(n_unload_words > 0, "mechanism: unload");
    check(n_busy_wait > 0,    "mechanism: busy wait for continue");
    check(n_wait_cont_low > 0, "mechanism: wait for continue low");
    check(n_upper_limit > 0,  "mechanism: stop at upper limit");
    check(n_wrap > 0,         "mechanism: window wrap");
    check(n_done_load > 0,    "mechanism: done in load_mem");
    check(n_done_unload > 0,  "mechanism: done in unload_mem");
    check(n_done_wait > 0,    "mechanism: done in wait_load_unload");
    check(n_reset > 1,        "mechanism: RESET_EXT");
    $display("loaded %0d unloaded %0d busy-waits %0d continue-holds %0d windows %0d wraps %0d",
             n_load_words, n_unload_words, n_busy_wait, n_wait_cont_low, n_upper_limit, n_wrap);
    $display("done-exits load %0d unload %0d wait %0d resets %0d",
             n_done_load, n_done_unload, n_done_wait, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
