// ddu5ctrl_pkg: constants and types shared by the DDU5 central-control blocks.
//
// Holds the JTAG opcode list of the control FPGA, the FMM (fast merging
// module) status bit positions, the bit assignment of the kill register,
// the 8b/10b ordered-set characters used on the Gigabit Ethernet spy link,
// and the fixed words of the DDU event format. Opcodes, bit positions,
// timeout counts and characters follow the DDU5 control design; the enum
// encoding width is this implementation's choice.
package ddu5ctrl_pkg;

  // ---------------- JTAG user instructions ----------------
  typedef enum logic [7:0] {
    OP_NOOP        = 8'd0,
    OP_FPGA_RESET  = 8'd1,   // toggled function
    OP_RD_L1A      = 8'd2,   // 24-bit L1A scaler
    OP_STATUS32    = 8'd3,
    OP_STATUS_LO   = 8'd4,
    OP_STATUS_HI   = 8'd5,
    OP_OUT_STATUS  = 8'd6,
    OP_FIFO_A      = 8'd7,
    OP_FIFO_B      = 8'd8,
    OP_FIFO_FULL   = 8'd9,
    OP_CRC_ERR     = 8'd10,
    OP_FIFO_C      = 8'd11,
    OP_XMIT_ERR    = 8'd12,
    OP_RD_KILL     = 8'd13,
    OP_LD_KILL     = 8'd14,
    OP_DMB_ERR     = 8'd15,
    OP_TMB_ERR     = 8'd16,
    OP_ALCT_ERR    = 8'd17,
    OP_LOST_EVT    = 8'd18,
    OP_INRD_STAT   = 8'd19,
    OP_INRD_CCODE  = 8'd20,
    OP_ERR_A       = 8'd22,
    OP_ERR_B       = 8'd23,
    OP_ERR_C       = 8'd24,
    OP_DMB_LIVE    = 8'd25,
    OP_PDMB_LIVE   = 8'd26,
    OP_WARN_MON    = 8'd27,
    OP_LD_BXORBIT  = 8'd29,
    OP_RD_BXORBIT  = 8'd30,
    OP_TOG_CAL_L1  = 8'd31,  // toggled function
    OP_BOARD_ID    = 8'd32,
    OP_VME_L1A     = 8'd33
  } jtag_op_e;

  localparam int unsigned NUM_OPS = 34;

  // ---------------- FMM status bits ----------------
  localparam int unsigned FMM_BUSY  = 0;  // not ready
  localparam int unsigned FMM_WARN  = 1;  // warning / near full
  localparam int unsigned FMM_SYNC  = 2;  // lost sync, needs sync reset
  localparam int unsigned FMM_ERROR = 3;  // error, needs hard reset

  // ---------------- kill register ----------------
  localparam int unsigned NFIBER      = 15;   // DMB input fibres
  localparam int unsigned KILL_W      = 20;
  localparam int unsigned KILL_CHKDIS = 15;   // enables the check-disable bits
  localparam int unsigned KILL_ALCT   = 16;
  localparam int unsigned KILL_TMB    = 17;
  localparam int unsigned KILL_CFEB   = 18;

  // ---------------- timeouts (25 ns clock periods) ----------------
  localparam int unsigned EVT_START_TIMEOUT  = 128;    // 3.2 us
  localparam int unsigned CAL_START_TIMEOUT  = 288;    // 7.2 us
  localparam int unsigned FIFO_DONE_TIMEOUT  = 38914;  // 972 us

  // ---------------- bunch crossing ----------------
  localparam logic [11:0] BX_LIM_LHC = 12'd3563;
  localparam logic [11:0] BX_LIM_SPS = 12'd923;

  // ---------------- 8b/10b characters, {K flag, byte} ----------------
  localparam logic [8:0] K28_5 = 9'h1BC;
  localparam logic [8:0] D16_2 = 9'h050;
  localparam logic [8:0] D21_5 = 9'h0B5;
  localparam logic [8:0] D2_2  = 9'h042;
  localparam logic [8:0] K29_7 = 9'h1FD;  // end of packet /T/
  localparam logic [8:0] K23_7 = 9'h1F7;  // carrier extend /R/

  // ---------------- DDU event format ----------------
  localparam logic [63:0] DDU_HDR2 = 64'h8000_0001_8000_0000; // low 16 bits filled in
  localparam logic [63:0] DDU_TRL2 = 64'h8000_FFFF_8000_8000; // second-to-last word
  localparam logic [3:0]  DDU_FOV  = 4'h5;                    // format version
  localparam logic [3:0]  DDU_BOE  = 4'h5;                    // begin of event nibble
  localparam logic [3:0]  DDU_EOE  = 4'hA;                    // end of event nibble

  // ---------------- CRC-16, x^16 + x^15 + x^2 + 1 ----------------
  // Next CRC after one 64-bit word, data bit 63 shifted in first, MSB-first
  // shift register (polynomial 16'h8005).
  function automatic logic [15:0] crc16_next(input logic [15:0] c, input logic [63:0] d);
    logic [15:0] r;
    logic        fb;
    r = c;
    for (int i = 63; i >= 0; i--) begin
      fb = r[15] ^ d[i];
      r  = {r[14:0], 1'b0};
      if (fb) r = r ^ 16'h8005;
    end
    return r;
  endfunction

endpackage
