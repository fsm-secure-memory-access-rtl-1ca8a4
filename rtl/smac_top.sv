// smac_top: programmable-logic side of the secure memory access design.
//
// The processor reaches the design only through two 32-bit GPIO registers.
// GPIO_Ins (processor to logic) carries RESET_EXT (bit 31), start (30),
// load_unload (26), done (25), continue (24) and 16 bits of data (15..0).
// GPIO_Outs (logic to processor) carries ready (31), stopped (28) and 16
// bits of data (15..0); its other bits are zero. The top splits and packs
// these fields, drives the controller's synchronous reset from RESET_EXT,
// and connects the controller (load_unload_mem) to its block RAM
// (pnl_bram). The address window [base_address, upper_limit] comes from
// other logic on the PL side, not from the processor, which is what keeps
// the processor's access restricted.
//
// The GPIO peripheral itself and the processor are outside this module:
// GPIO_Ins and GPIO_Outs are the peripheral's register contents, both
// assumed to be in the clk domain. GPIO_Ins bits 29..27 and 23..16 are
// unused and are left unconnected on purpose.
//
// Timing: one word moves per stopped/continue handshake. A word takes at
// least two clocks: one in load_mem or unload_mem (stopped high) until
// continue is seen high, one in wait_load_unload until continue is seen
// low; each state holds for as long as the processor side takes to answer.
// GPIO_Outs follows the controller's state with no extra register.
module smac_top
  import smac_pkg::*;
#(
  parameter int unsigned ADDR_W = smac_pkg::SMAC_ADDR_W
) (
  input  logic              clk,
  input  logic [GPIO_W-1:0] GPIO_Ins,
  output logic [GPIO_W-1:0] GPIO_Outs,
  input  logic [ADDR_W-1:0] base_address,
  input  logic [ADDR_W-1:0] upper_limit
);

  logic              ready, stopped;
  logic [SMAC_DATA_W-1:0] data_out;
  logic [ADDR_W-1:0] bram_addr;
  logic              bram_we;
  logic [SMAC_DATA_W-1:0] bram_din, bram_dout;

  load_unload_mem #(
    .ADDR_W (ADDR_W),
    .DATA_W (SMAC_DATA_W)
  ) u_smac (
    .clk          (clk),
    .rst          (GPIO_Ins[GI_RESET_EXT]),
    .start        (GPIO_Ins[GI_START]),
    .load_unload  (GPIO_Ins[GI_LOAD_UNLOAD]),
    .done         (GPIO_Ins[GI_DONE]),
    .cont         (GPIO_Ins[GI_CONTINUE]),
    .data_in      (GPIO_Ins[SMAC_DATA_W-1:0]),
    .ready        (ready),
    .stopped      (stopped),
    .data_out     (data_out),
    .base_address (base_address),
    .upper_limit  (upper_limit),
    .bram_addr    (bram_addr),
    .bram_we      (bram_we),
    .bram_din     (bram_din),
    .bram_dout    (bram_dout)
  );

  pnl_bram #(
    .ADDR_W (ADDR_W),
    .DATA_W (SMAC_DATA_W)
  ) u_bram (
    .clk  (clk),
    .addr (bram_addr),
    .we   (bram_we),
    .din  (bram_din),
    .dout (bram_dout)
  );

  always_comb begin
    GPIO_Outs               = '0;
    GPIO_Outs[GO_READY]     = ready;
    GPIO_Outs[GO_STOPPED]   = stopped;
    GPIO_Outs[SMAC_DATA_W-1:0]   = data_out;
  end

endmodule
