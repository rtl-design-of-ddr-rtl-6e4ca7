// controller: timing and control state machine of the DDR SDRAM controller.
//
// After reset the machine runs the power-up sequence on its own: CKE is held
// low for INIT_WAIT clocks, then it issues PRECHARGE ALL, LOAD MODE REGISTER
// to the extended mode register (DLL enable), LOAD MODE REGISTER to the mode
// register (DLL reset, burst length and CAS latency), PRECHARGE ALL and two
// AUTO REFRESH commands. It then waits in IDLE for user commands on the
// one-hot u_cmd[7:1] (see ddr_pkg): PRECHARGE, REFRESH and LOAD_MR issue one
// command and return to IDLE; READ and WRITE open the row with ACT, wait
// tRCD in ACT_WAIT and issue READ or WRITE with auto precharge.
//
// State transitions (conditions as printed on the state diagram):
//   ACT       -> READ/WRITE on rcd_end, else ACT_WAIT (loops on !rcd_end)
//   READ      -> READ_DATA on cas_lat_end, else READ_WAIT
//   READ_WAIT -> loops on !cas_lat_end; READ_DATA on cas_lat_end & burst_8;
//                IDLE on cas_lat_end & !burst_8
//   READ_DATA, WRITE_DATA -> loop on !burst_end & burst_8, else IDLE
//   WRITE     -> IDLE on burst_2, else WRITE_DATA
// One clock of user write data is taken in WRITE and in each WRITE_DATA
// cycle, so a burst of 2, 4 or 8 spends 1, 2 or 4 cycles there.
//
// Outputs are decoded from the state register. ddr_dqs_t and ddr_write_en
// (one bit per data beat of the burst) are high in the WRITE cycle and tell
// the data path to drive the burst from the next clock. u_data_valid_en and
// ddr_read_en (one bit per clock of read data) are registered and high for
// one cycle, floor(CL) cycles after the READ cycle, when the first read
// beat is due at the data path.
//
// Command spacing is kept by a recovery timer that is held loaded outside
// IDLE and counts down in IDLE: tRP after PRECHARGE, tRFC after REFRESH,
// tMRD after LOAD_MR, and after a READ/WRITE with auto precharge the write
// recovery, tRP and tRC before the next ACT. u_busy is low in the IDLE
// cycles in which a command on u_cmd is accepted; a command in any other
// cycle is ignored. u_ref_ack is high in the cycle a user REFRESH is
// issued. rcd_val is the constant tRCD counter load (T_RCD-2); it is an
// output so that the counter stays a separate block.
//
// Taken from the document: the power-up order, the state names, the
// conditions printed on the state diagram and the counter handshakes
// (ld_* / *_end). This design's own: where the unlabelled arcs lead (back
// to IDLE), the command encoding of PRECHARGE, the CKE-low wait, the timer
// values, u_busy, ld_addr and mrs_src. Because the counters hold their end
// flag low in the cycle they load, the READ -> READ_DATA and ACT -> READ/
// WRITE arcs are kept but never taken with these counters.
module controller
  import ddr_pkg::*;
#(
  parameter int unsigned T_RCD     = 3,      // ACT to READ/WRITE, clocks
  parameter int unsigned T_RP      = 3,      // PRECHARGE period, clocks
  parameter int unsigned T_RFC     = 8,      // AUTO REFRESH period, clocks
  parameter int unsigned T_MRD     = 2,      // LOAD MR to next command, clocks
  parameter int unsigned T_WR      = 2,      // write recovery, clocks
  parameter int unsigned T_RC      = 7,      // ACT to ACT, clocks
  parameter int unsigned INIT_WAIT = 20000   // power-up wait with CKE low, clocks
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:1] u_cmd,
  // counters and address latch
  input  logic       burst_end,
  input  logic       cas_lat_end,
  input  logic       rcd_end,
  input  logic       burst_8,
  input  logic       burst_2,
  input  logic [1:0] cas_lat_max,
  output logic       ld_burst,
  output logic       ld_cas_lat,
  output logic       ld_rcd,
  output logic [3:0] rcd_val,
  output logic       ld_addr,
  output logic       mrs_addr,
  output mrs_src_e   mrs_src,
  output logic       row_addr,
  // memory command pins
  output logic       ddr_rasb,
  output logic       ddr_casb,
  output logic       ddr_web,
  output logic       ddr_csb,
  output logic       ddr_cke,
  // data path controls
  output logic       ddr_dqs_t,
  output logic [7:0] ddr_write_en,
  output logic [3:0] ddr_read_en,
  output logic       u_data_valid_en,
  // user side
  output logic       u_ref_ack,
  output logic       u_busy
);

  typedef enum logic [2:0] {
    I_PRE1, I_EMR, I_MR, I_PRE2, I_REF1, I_REF2, I_DONE
  } init_e;

  state_e state, state_n;
  init_e  init_q;
  logic   is_write_q;
  logic   user_ref_q;
  logic   pwr_done;
  logic [$clog2(INIT_WAIT+1)-1:0] pwr_cnt;

  // recovery timer
  logic       rec_ld, rec_end;
  logic [4:0] rec_val;

  // command accepted this cycle
  logic   accept, cmd_valid;

  ddr_counter #(.WIDTH(5)) u_rec_cntr (
    .clk(clk), .reset(reset), .ld(rec_ld), .load_val(rec_val), .cnt_end(rec_end)
  );

  // Power-up wait with CKE low.
  always_ff @(posedge clk) begin
    if (reset) begin
      pwr_cnt  <= '0;
      pwr_done <= 1'b0;
    end else if (!pwr_done) begin
      pwr_cnt  <= pwr_cnt + 1'b1;
      pwr_done <= (pwr_cnt == $bits(pwr_cnt)'(INIT_WAIT - 1));
    end
  end

  assign cmd_valid = (u_cmd == UCMD_READ) || (u_cmd == UCMD_WRITE) ||
                     (u_cmd == UCMD_PRECHARGE) || (u_cmd == UCMD_REFRESH) ||
                     (u_cmd == UCMD_LOAD_MR);
  assign accept = (state == S_IDLE) && rec_end && (init_q == I_DONE) && cmd_valid;

  // Next state.
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE: begin
        if (pwr_done && rec_end) begin
          if (init_q != I_DONE) begin
            unique case (init_q)
              I_PRE1, I_PRE2: state_n = S_PRECHARGE;
              I_EMR, I_MR:    state_n = S_LOAD_MR;
              default:        state_n = S_REFRESH;
            endcase
          end else if (accept) begin
            unique case (u_cmd)
              UCMD_READ, UCMD_WRITE: state_n = S_ACT;
              UCMD_PRECHARGE:        state_n = S_PRECHARGE;
              UCMD_REFRESH:          state_n = S_REFRESH;
              default:               state_n = S_LOAD_MR;
            endcase
          end
        end
      end
      S_PRECHARGE, S_REFRESH, S_LOAD_MR: state_n = S_IDLE;
      S_ACT, S_ACT_WAIT:
        if (rcd_end) state_n = is_write_q ? S_WRITE : S_READ;
        else         state_n = S_ACT_WAIT;
      S_READ:
        state_n = cas_lat_end ? S_READ_DATA : S_READ_WAIT;
      S_READ_WAIT:
        if (!cas_lat_end)  state_n = S_READ_WAIT;
        else if (burst_8)  state_n = S_READ_DATA;
        else               state_n = S_IDLE;
      S_READ_DATA, S_WRITE_DATA:
        state_n = (!burst_end && burst_8) ? state : S_IDLE;
      S_WRITE:
        state_n = burst_2 ? S_IDLE : S_WRITE_DATA;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S_IDLE;
      init_q     <= I_PRE1;
      is_write_q <= 1'b0;
      user_ref_q <= 1'b0;
      mrs_src    <= MRS_USER;
    end else begin
      state <= state_n;
      if (state == S_IDLE && state_n != S_IDLE) begin
        user_ref_q <= (init_q == I_DONE);
        is_write_q <= (u_cmd == UCMD_WRITE);
        mrs_src    <= (init_q == I_EMR) ? MRS_INIT_EMR :
                      (init_q == I_MR)  ? MRS_INIT_MR  : MRS_USER;
        if (init_q != I_DONE) init_q <= init_e'(init_q + 1'b1);
      end
    end
  end

  // Recovery before the next command, loaded on every return to IDLE.
  function automatic logic [4:0] sat5(input int v);
    return (v < 0) ? 5'd0 : (v > 31) ? 5'd31 : 5'(v);
  endfunction

  always_comb begin
    int half_burst, idle_entry, next_act;
    half_burst = burst_2 ? 1 : burst_8 ? 4 : 2;
    idle_entry = 0;
    next_act   = 0;
    // Held while busy; the value of the last cycle before IDLE counts.
    rec_ld  = (state != S_IDLE);
    rec_val = '0;
    unique case (state)
      S_PRECHARGE: rec_val = sat5(int'(T_RP) - 2);
      S_REFRESH:   rec_val = sat5(int'(T_RFC) - 2);
      S_LOAD_MR:   rec_val = sat5(int'(T_MRD) - 2);
      S_WRITE, S_WRITE_DATA: begin
        // cycles counted from the WRITE cycle
        idle_entry = half_burst;
        next_act   = 1 + half_burst + int'(T_WR) + int'(T_RP);
        if (int'(T_RC) - int'(T_RCD) > next_act) next_act = int'(T_RC) - int'(T_RCD);
        rec_val = sat5(next_act - 1 - idle_entry);
      end
      S_READ, S_READ_WAIT, S_READ_DATA: begin
        // cycles counted from the READ cycle
        idle_entry = 2 + int'(cas_lat_max) + (burst_8 ? 3 : 0);
        next_act   = half_burst + int'(T_RP);
        if (int'(T_RC) - int'(T_RCD) > next_act) next_act = int'(T_RC) - int'(T_RCD);
        rec_val = sat5(next_act - 1 - idle_entry);
      end
      default: rec_val = '0;
    endcase
  end

  // Command pins.
  dcmd_e dcmd;
  always_comb begin
    unique case (state)
      S_PRECHARGE: dcmd = DCMD_PRE;
      S_REFRESH:   dcmd = DCMD_REF;
      S_LOAD_MR:   dcmd = DCMD_MRS;
      S_ACT:       dcmd = DCMD_ACT;
      S_READ:      dcmd = DCMD_READ;
      S_WRITE:     dcmd = DCMD_WRITE;
      default:     dcmd = DCMD_NOP;
    endcase
  end
  assign {ddr_rasb, ddr_casb, ddr_web} = dcmd;

  always_ff @(posedge clk) begin
    if (reset) begin
      ddr_cke <= 1'b0;
      ddr_csb <= 1'b1;
    end else begin
      ddr_cke <= pwr_done;
      ddr_csb <= !pwr_done;
    end
  end

  // Counter and address latch controls.
  assign ld_rcd     = (state == S_ACT);
  assign rcd_val    = 4'(T_RCD - 2);
  assign ld_cas_lat = (state == S_READ);
  assign ld_burst   = (state == S_WRITE) || (state == S_READ) || (state == S_READ_WAIT);
  assign row_addr   = (state == S_ACT);
  assign mrs_addr   = (state == S_LOAD_MR);
  assign ld_addr    = accept;

  // Data path controls.
  assign ddr_dqs_t    = (state == S_WRITE);
  assign ddr_write_en = (state != S_WRITE) ? 8'h00 :
                        burst_2 ? 8'h03 : burst_8 ? 8'hff : 8'h0f;

  always_ff @(posedge clk) begin
    if (reset) begin
      u_data_valid_en <= 1'b0;
      ddr_read_en     <= '0;
    end else begin
      u_data_valid_en <= ((state == S_READ) || (state == S_READ_WAIT)) && cas_lat_end;
      ddr_read_en     <= !(((state == S_READ) || (state == S_READ_WAIT)) && cas_lat_end) ? 4'h0 :
                         burst_2 ? 4'h1 : burst_8 ? 4'hf : 4'h3;
    end
  end

  assign u_ref_ack = (state == S_REFRESH) && user_ref_q;
  assign u_busy    = !((state == S_IDLE) && rec_end && (init_q == I_DONE));

  // A command is only accepted when the controller is ready for it.
  assert property (@(posedge clk) disable iff (reset) ld_addr |-> !u_busy);
  // The burst counter is only relied on for bursts of 8.
  assert property (@(posedge clk) disable iff (reset)
                   (state == S_READ_DATA || state == S_WRITE_DATA) && !burst_8 |-> state_n == S_IDLE);

endmodule
