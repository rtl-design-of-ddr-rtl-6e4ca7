// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// Holds the user command encoding (one-hot on u_cmd[7:1]), the controller
// state encoding, the DDR command encodings on {ras_n, cas_n, we_n} and the
// JEDEC DDR mode-register fields the address latch decodes. The command
// codes for NOP, LOAD_MR, READ, WRITE and REFRESH follow the user command
// values of the reference waveforms; PRECHARGE on u_cmd[5] is this design's
// own choice, and u_cmd[7] is unused.
package ddr_pkg;

  // Widths of the reference configuration.
  localparam int unsigned UADDR_W = 22;  // u_addr[21:0]
  localparam int unsigned AD_W    = 12;  // ddr_ad[11:0]
  localparam int unsigned BA_W    = 2;   // ddr_ba[1:0]
  localparam int unsigned COL_W   = 8;   // column bits u_addr[7:0]
  localparam int unsigned DQ_W    = 64;  // ddr_dq[63:0]
  localparam int unsigned UDATA_W = 2 * DQ_W;  // u_data_i/u_data_o[127:0]

  // User command, one-hot on u_cmd[7:1] (bit 1 = value 7'b0000001).
  typedef enum logic [7:1] {
    UCMD_NOP       = 7'b0000001,
    UCMD_LOAD_MR   = 7'b0000010,
    UCMD_READ      = 7'b0000100,
    UCMD_WRITE     = 7'b0001000,
    UCMD_PRECHARGE = 7'b0010000,
    UCMD_REFRESH   = 7'b0100000
  } ucmd_e;

  // Controller states (state diagram of the controller).
  typedef enum logic [3:0] {
    S_IDLE,
    S_PRECHARGE,
    S_REFRESH,
    S_LOAD_MR,
    S_ACT,
    S_ACT_WAIT,
    S_READ,
    S_READ_WAIT,
    S_READ_DATA,
    S_WRITE,
    S_WRITE_DATA
  } state_e;

  // DDR SDRAM commands as {ras_n, cas_n, we_n} with cs_n low.
  typedef enum logic [2:0] {
    DCMD_MRS   = 3'b000,
    DCMD_REF   = 3'b001,
    DCMD_PRE   = 3'b010,
    DCMD_ACT   = 3'b011,
    DCMD_WRITE = 3'b100,
    DCMD_READ  = 3'b101,
    DCMD_NOP   = 3'b111
  } dcmd_e;

  // Source of the value put on ddr_ad/ddr_ba by a LOAD MODE REGISTER.
  typedef enum logic [1:0] {
    MRS_USER,      // taken from the latched user address
    MRS_INIT_EMR,  // power-up: extended mode register, DLL enable
    MRS_INIT_MR    // power-up: mode register with DLL reset
  } mrs_src_e;

  // Mode register fields (JEDEC DDR): A[2:0] burst length, A3 burst type,
  // A[6:4] CAS latency, A8 DLL reset.
  localparam logic [2:0] MR_BL2   = 3'b001;
  localparam logic [2:0] MR_BL4   = 3'b010;
  localparam logic [2:0] MR_BL8   = 3'b011;
  localparam logic [2:0] MR_CL2   = 3'b010;
  localparam logic [2:0] MR_CL3   = 3'b011;
  localparam logic [2:0] MR_CL2_5 = 3'b110;
  localparam int unsigned MR_DLL_RESET_BIT = 8;

  // Mode register value for burst length 4, sequential, CAS latency 2.
  localparam logic [AD_W-1:0] MR_BL4_CL2 = {5'b00000, MR_CL2, 1'b0, MR_BL4};

endpackage
