// tb_load_unload_mem: self-checking test of the SMAC state machine.
//
// A small address space (4 bits) is used so that windows that wrap past the
// end of memory are cheap to test. A behavioural one-cycle-read RAM stands
// in for the block RAM. A host model plays the processor's side of the
// stopped/continue handshake, waiting a random number of clocks before each
// of its moves. The test checks, against values the host works out itself:
// every write's address and data, every unloaded word, that no word outside
// the window is touched, the cycle timing of each handshake step, the early
// exit through 'done' from load_mem, unload_mem and wait_load_unload, the
// return to idle at the upper limit, and the synchronous reset.
module tb_load_unload_mem;
  import smac_pkg::*;
  localparam int unsigned AW = 4;
  localparam int unsigned DW = 16;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic          rst, start, load_unload, done, cont;
  logic [DW-1:0] data_in, data_out;
  logic          ready, stopped;
  logic [AW-1:0] base_address, upper_limit;
  logic [AW-1:0] bram_addr;
  logic          bram_we;
  logic [DW-1:0] bram_din, bram_dout;

  int checks = 0, failures = 0;
  int writes_seen = 0;
  logic [DW-1:0] ram       [N];   // behavioural block RAM
  logic [DW-1:0] host_view [N];   // what the host expects the RAM to hold

  load_unload_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (bram_we) ram[bram_addr] <= bram_din;
    bram_dout <= bram_we ? bram_din : ram[bram_addr];
  end

  always @(posedge clk) if (bram_we) writes_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // data is only shown to the processor while unloading
  always @(negedge clk) if (!rst && ready) check(data_out == '0, "data_out zero in idle");

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Issue 'start' from idle.
  task automatic start_op(input bit lu, input int base, input int upper);
    check(ready === 1'b1 && stopped === 1'b0, "ready in idle before start");
    base_address = AW'(base);
    upper_limit  = AW'(upper);
    load_unload  = lu;
    start        = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // start seen at the edge: now in load_mem/unload_mem, stopped already up
    check(ready === 1'b0, "ready drops after start");
    check(stopped === 1'b1, "stopped one clock after start");
  endtask

  // One word of the handshake. The controller is in load_mem/unload_mem
  // (stopped high). 'last' tells whether the host expects the window to end.
  task automatic one_word(input bit lu, input int addr, input bit last);
    logic [DW-1:0] w;
    int d;
    check(stopped === 1'b1, $sformatf("stopped up for word %0d", addr));
    if (lu) check(data_out == host_view[addr],
                  $sformatf("unload word %0d: got %h want %h", addr, data_out, host_view[addr]));
    // busy wait in load_mem/unload_mem
    d = $urandom_range(0, 3);
    repeat (d) begin
      @(negedge clk);
      check(stopped === 1'b1, "stopped held while continue low");
    end
    w = DW'($urandom);
    if (!lu) data_in = w;
    cont = 1'b1;
    #1;
    if (!lu) begin
      check(bram_we === 1'b1, "write enable with continue in load_mem");
      check(bram_addr == AW'(addr), $sformatf("write address %0d got %0d", addr, bram_addr));
      check(bram_din == w, "write data");
      host_view[addr] = w;
    end else begin
      check(bram_we === 1'b0, "no write while unloading");
    end
    @(negedge clk);
    check(stopped === 1'b0, "stopped drops one clock after continue");
    check(bram_we === 1'b0, "single write per word");
    d = $urandom_range(0, 3);
    repeat (d) begin
      @(negedge clk);
      check(stopped === 1'b0 && ready === 1'b0, "wait_load_unload holds while continue high");
    end
    cont = 1'b0;
    @(negedge clk);
    if (last) check(ready === 1'b1 && stopped === 1'b0, "back to idle at upper limit");
    else      check(stopped === 1'b1 && ready === 1'b0, "next word one clock after continue low");
  endtask

  task automatic transfer(input bit lu, input int base, input int upper);
    int a, n, w0;
    w0 = writes_seen;
    n = ((upper - base) % N + N) % N + 1;
    start_op(lu, base, upper);
    for (int i = 0; i < n; i++) begin
      a = (base + i) % N;
      one_word(lu, a, i == n - 1);
    end
    check(writes_seen - w0 == (lu ? 0 : n), $sformatf("write count %0d", writes_seen - w0));
  endtask

  // Compare the whole RAM with the host's expectation.
  task automatic check_ram();
    for (int i = 0; i < N; i++)
      check(ram[i] == host_view[i], $sformatf("ram[%0d] %h want %h", i, ram[i], host_view[i]));
  endtask

  // 'done' raised while waiting in wait_done state; released after 'hold'.
  task automatic finish_done(input int hold);
    @(negedge clk);
    check(stopped === 1'b0 && ready === 1'b0, "wait_done after done");
    repeat (hold) begin
      @(negedge clk);
      check(ready === 1'b0 && stopped === 1'b0, "wait_done holds while done high");
    end
    done = 1'b0;
    @(negedge clk);
    check(ready === 1'b1, "idle one clock after done low");
  endtask

  initial begin
    int w0;
    rst = 1'b1; start = 1'b0; load_unload = 1'b0; done = 1'b0; cont = 1'b0;
    data_in = '0; base_address = '0; upper_limit = '0;
    for (int i = 0; i < N; i++) begin
      ram[i] = '0;
      host_view[i] = '0;
    end
    idle_cycles(3);
    rst = 1'b0;
    @(negedge clk);
    check(ready === 1'b1 && stopped === 1'b0 && bram_we === 1'b0, "idle after reset");

    // fill the whole memory, then windows
    transfer(1'b0, 0, N - 1);
    check_ram();
    transfer(1'b1, 0, N - 1);
    transfer(1'b0, 3, 7);
    check_ram();
    transfer(1'b1, 3, 7);
    transfer(1'b0, 12, 12);          // one-word window
    transfer(1'b1, 12, 12);
    transfer(1'b0, 14, 1);           // wraps: 14, 15, 0, 1
    check_ram();
    transfer(1'b1, 14, 1);
    idle_cycles(2);
    check(ready === 1'b1, "idle holds without start");

    // done in load_mem before any write
    w0 = writes_seen;
    start_op(1'b0, 4, 9);
    done = 1'b1;
    cont = 1'b1;                     // continue together with done: no write
    #1 check(bram_we === 1'b0, "done blocks the write");
    cont = 1'b0;
    finish_done(2);
    check(writes_seen == w0, "no write after early done in load_mem");

    // done in unload_mem
    start_op(1'b1, 4, 9);
    check(data_out == host_view[4], "first unloaded word before done");
    done = 1'b1;
    finish_done(1);

    // done in wait_load_unload, after the first word of a load
    w0 = writes_seen;
    start_op(1'b0, 8, 11);
    data_in = 16'hA5A5;
    cont = 1'b1;
    #1 host_view[8] = 16'hA5A5;
    @(negedge clk);
    check(stopped === 1'b0, "in wait_load_unload");
    done = 1'b1;
    idle_cycles(1);
    check(stopped === 1'b0 && ready === 1'b0, "done waits for continue low");
    cont = 1'b0;
    finish_done(0);
    check(writes_seen == w0 + 1, "exactly one write before done");
    check_ram();

    // synchronous reset in the middle of an unload
    start_op(1'b1, 0, 5);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(ready === 1'b1 && stopped === 1'b0, "reset returns to idle");

    // a full run after reset still works
    transfer(1'b0, 5, 10);
    transfer(1'b1, 0, N - 1);
    check_ram();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
