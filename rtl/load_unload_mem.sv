// load_unload_mem: the secure memory access controller (SMAC) state machine.
//
// A program on the processor side may only move data into and out of the
// block RAM through this controller, one 16-bit word at a time and only
// inside the address window [base_address, upper_limit] that the PL side
// supplies. The window is latched when 'start' is seen in idle; the
// processor never sees or sets an address.
//
// States and transitions (the controller's published algorithm):
//   idle             ready=1. On start: latch base and upper limit, go to
//                    load_mem if load_unload=0, else unload_mem.
//   load_mem         stopped=1. If done: go to wait_done. Else, when
//                    continue is high: write data_in to BRAM[base]
//                    (bram_we=1) and go to wait_load_unload.
//   unload_mem       stopped=1, data_out = BRAM[base]. If done: go to
//                    wait_done. Else, when continue is high (the program
//                    has taken the word), go to wait_load_unload.
//   wait_load_unload stopped=0. When continue is low: if done go to
//                    wait_done; else if base = upper limit go to idle;
//                    else base = base + 1 and go back to load_mem or
//                    unload_mem according to load_unload.
//   wait_done        when done is low, go to idle.
// The window is inclusive: a transfer also takes place at the upper limit
// before the controller returns to idle. If base_address > upper_limit the
// address wraps through the end of the BRAM.
//
// Handshake per word (two-way, stopped/continue): the controller raises
// stopped, the program puts its data on the GPIO and raises continue in the
// same register write, the controller takes it and drops stopped, the
// program drops continue, the controller moves on. An unload is the same
// with the data flowing the other way.
//
// Structure: state and address registers in one always_ff, next-state
// logic in one always_comb and output logic in continuous assignments.
// ready, stopped and data_out are Moore outputs (state only); bram_we is a
// Mealy output (load_mem and continue and not done).
//
// Timing and choices of this design: the reset is synchronous and active
// high. The BRAM has a one-clock read, so bram_addr is driven with the
// address register's next value; the RAM output then always holds the word
// at the current base address, and data_out is valid in the first cycle of
// unload_mem, together with stopped. In load_mem the base address does not
// change, so the write uses the same port. data_out is zero outside
// unload_mem so that nothing of the memory shows on the GPIO otherwise.
module load_unload_mem
  import smac_pkg::*;
#(
  parameter int unsigned ADDR_W = smac_pkg::SMAC_ADDR_W,
  parameter int unsigned DATA_W = smac_pkg::SMAC_DATA_W
) (
  input  logic              clk,
  input  logic              rst,           // synchronous, active high
  // control from the processor side
  input  logic              start,
  input  logic              load_unload,   // 0 = load (write BRAM), 1 = unload
  input  logic              done,
  input  logic              cont,          // 'continue' of the handshake
  input  logic [DATA_W-1:0] data_in,       // GPIO data toward the BRAM
  // status and data to the processor side
  output logic              ready,
  output logic              stopped,
  output logic [DATA_W-1:0] data_out,      // BRAM data toward the GPIO
  // address window from the PL side
  input  logic [ADDR_W-1:0] base_address,
  input  logic [ADDR_W-1:0] upper_limit,
  // block RAM port
  output logic [ADDR_W-1:0] bram_addr,
  output logic              bram_we,
  output logic [DATA_W-1:0] bram_din,
  input  logic [DATA_W-1:0] bram_dout
);

  smac_state_t       state_reg, state_next;
  logic [ADDR_W-1:0] base_reg,  base_next;
  logic [ADDR_W-1:0] upper_reg, upper_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_reg <= ST_IDLE;
      base_reg  <= '0;
      upper_reg <= '0;
    end else begin
      state_reg <= state_next;
      base_reg  <= base_next;
      upper_reg <= upper_next;
    end
  end

  always_comb begin
    state_next = state_reg;
    base_next  = base_reg;
    upper_next = upper_reg;
    unique case (state_reg)
      ST_IDLE: begin
        if (start) begin
          base_next  = base_address;
          upper_next = upper_limit;
          state_next = load_unload ? ST_UNLOAD_MEM : ST_LOAD_MEM;
        end
      end
      ST_LOAD_MEM, ST_UNLOAD_MEM: begin
        if (done)      state_next = ST_WAIT_DONE;
        else if (cont) state_next = ST_WAIT_LOAD_UNLOAD;
      end
      ST_WAIT_LOAD_UNLOAD: begin
        if (!cont) begin
          if (done) begin
            state_next = ST_WAIT_DONE;
          end else if (base_reg == upper_reg) begin
            state_next = ST_IDLE;
          end else begin
            base_next  = base_reg + 1'b1;
            state_next = load_unload ? ST_UNLOAD_MEM : ST_LOAD_MEM;
          end
        end
      end
      ST_WAIT_DONE: begin
        if (!done) state_next = ST_IDLE;
      end
      default: state_next = ST_IDLE;
    endcase
  end

  // Moore outputs
  assign ready    = (state_reg == ST_IDLE);
  assign stopped  = (state_reg == ST_LOAD_MEM) || (state_reg == ST_UNLOAD_MEM);
  assign data_out = (state_reg == ST_UNLOAD_MEM) ? bram_dout : '0;

  // Mealy output and BRAM port
  assign bram_we   = (state_reg == ST_LOAD_MEM) && !done && cont;
  assign bram_din  = data_in;
  assign bram_addr = base_next;

  // Handshake rules: a write happens only while stopped is raised, and the
  // controller is never ready and stopped at once.
  a_we_when_stopped : assert property (@(posedge clk) disable iff (rst)
                                       bram_we |-> stopped);
  a_ready_xor_stop  : assert property (@(posedge clk) disable iff (rst)
                                       !(ready && stopped));
  // In load_mem the write address is the latched base address.
  a_write_addr      : assert property (@(posedge clk) disable iff (rst)
                                       bram_we |-> (bram_addr == base_reg));

endmodule
