// tb_pnl_bram: self-checking test of the single-port block RAM.
//
// Fills every word with a pseudo-random value, reads all of them back in a
// shuffled order and checks each against a scoreboard kept in the
// testbench, checking also that the word appears exactly one clock after
// its address (one-cycle read latency) and that a write shows the written
// word on dout (write-first). A watchdog ends the run if it hangs.
module tb_pnl_bram;
  localparam int unsigned AW = 10;
  localparam int unsigned DW = 16;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic [AW-1:0] addr;
  logic          we;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] expect_mem [N];
  int checks = 0, failures = 0;

  pnl_bram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a;
    we = 1'b0; addr = '0; din = '0;
    @(negedge clk);
    // write every word; dout must show the word just written
    for (int i = 0; i < N; i++) begin
      addr = AW'(i);
      din  = DW'($urandom);
      we   = 1'b1;
      expect_mem[i] = din;
      @(negedge clk);
      check(dout == expect_mem[i], $sformatf("write-first dout at %0d", i));
    end
    we = 1'b0;
    // read back in a scrambled order (odd stride covers every address)
    for (int i = 0; i < N; i++) begin
      a    = (i * 37 + 11) % N;
      addr = AW'(a);
      @(negedge clk);
      check(dout == expect_mem[a], $sformatf("read %0d: got %h want %h", a, dout, expect_mem[a]));
      // dout must hold while the address stays the same and nothing is written
      @(negedge clk);
      check(dout == expect_mem[a], $sformatf("hold %0d", a));
    end
    // one-cycle latency: the address changes, dout changes only after an edge
    addr = AW'(1);
    @(negedge clk);
    addr = AW'(2);
    #1 check(dout == expect_mem[1], "latency: old word before the edge");
    @(negedge clk);
    check(dout == expect_mem[2], "latency: new word after one edge");
    // overwrite and read back
    addr = AW'(5); din = ~expect_mem[5]; we = 1'b1; expect_mem[5] = din;
    @(negedge clk);
    we = 1'b0; addr = AW'(6);
    @(negedge clk);
    addr = AW'(5);
    @(negedge clk);
    check(dout == expect_mem[5], "overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
