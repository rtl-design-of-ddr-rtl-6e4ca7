// data_path: single-rate user data to double-rate DQ/DQS and back.
//
// The user side moves one 128-bit word per clk; the memory side moves one
// 64-bit beat on each edge of the memory clock, i.e. one beat per clk2x
// cycle. clk2x must be twice clk and rise together with every clk rising
// edge. The data path runs on clk2x and tells the two clk2x edges of a clk
// cycle apart by comparing a clk-domain toggle with its clk2x-domain copy
// (phase 0 = the clk2x edge that coincides with a clk edge).
//
// Write: in the controller's WRITE cycle ddr_dqs_t and ddr_write_en (one bit
// per beat) are high. DQS is driven low from the following clk2x falling edge
// (preamble). From the next clk edge the data path drives ddr_dq with the low
// half of u_data_i and half a clk later with the high half; each following
// clk cycle supplies the next user word. DQS is launched on the falling edge
// of clk2x, a quarter clock after DQ, so its edges sit in the middle of each
// beat: high for even beats, low for odd beats, then half a clock of low
// postamble before release.
//
// Read: u_data_valid_en is high for one clk cycle with ddr_read_en (one bit
// per clk cycle of the burst). At the next clk2x edge (or one clk2x later if
// cas_half is set, for CAS latency 2.5) the data path starts sampling ddr_dq
// on every clk2x rising edge, which is the centre of a beat when the memory
// drives DQ edge-aligned with the memory clock. Pairs of beats (first beat
// in the low half) form a 128-bit word that is presented on u_data_o with
// u_data_valid for exactly one clk cycle, aligned to clk.
//
// The document gives the data path's job and port names; the sampling
// scheme, the preamble/postamble timing and the phase detection are this
// design's choices. DQ and DQS use separate output, enable and input signals
// because the bidirectional pads are outside this module.
module data_path
  import ddr_pkg::*;
(
  input  logic               clk,
  input  logic               clk2x,
  input  logic               reset,
  // user side
  input  logic [UDATA_W-1:0] u_data_i,
  output logic [UDATA_W-1:0] u_data_o,
  output logic               u_data_valid,
  // controller
  input  logic               ddr_dqs_t,
  input  logic [7:0]         ddr_write_en,
  input  logic [3:0]         ddr_read_en,
  input  logic               u_data_valid_en,
  input  logic               cas_half,
  // memory side
  output logic [DQ_W-1:0]    ddr_dq_o,
  output logic               ddr_dq_oe,
  input  logic [DQ_W-1:0]    ddr_dq_i,
  output logic [1:0]         ddr_dqs_o,
  output logic               ddr_dqs_oe
);

  // ---- phase of clk2x within clk ----
  logic tog, tog_d, phase0;

  always_ff @(posedge clk) begin
    if (reset) tog <= 1'b0;
    else       tog <= !tog;
  end

  always_ff @(posedge clk2x) tog_d <= tog;

  assign phase0 = (tog == tog_d);

  // ---- write ----
  logic [DQ_W-1:0] wr_hi;
  logic [6:0]      wr_rem;
  logic            beat_even, pre, post;

  always_ff @(posedge clk2x) begin
    if (phase0) begin
      ddr_dq_o <= u_data_i[DQ_W-1:0];
      wr_hi    <= u_data_i[UDATA_W-1:DQ_W];
    end else begin
      ddr_dq_o <= wr_hi;
    end
  end

  always_ff @(posedge clk2x) begin
    if (reset) begin
      ddr_dq_oe <= 1'b0;
      wr_rem    <= '0;
      beat_even <= 1'b0;
      pre       <= 1'b0;
    end else begin
      if (phase0 && ddr_write_en != '0) begin
        ddr_dq_oe <= ddr_write_en[0];
        wr_rem    <= ddr_write_en[7:1];
      end else begin
        ddr_dq_oe <= wr_rem[0];
        wr_rem    <= wr_rem >> 1;
      end
      beat_even <= phase0;
      pre       <= !phase0 && ddr_dqs_t;
    end
  end

  always_ff @(negedge clk2x) begin
    if (reset) begin
      ddr_dqs_oe <= 1'b0;
      ddr_dqs_o  <= '0;
      post       <= 1'b0;
    end else begin
      ddr_dqs_oe <= pre || ddr_dq_oe || post;
      ddr_dqs_o  <= {2{ddr_dq_oe && beat_even}};
      post       <= ddr_dq_oe;
    end
  end

  // ---- read ----
  logic [7:0]      rd_mask, cap;
  logic            start, cap_now, have_lo, pend;
  logic [DQ_W-1:0] lo;
  logic [UDATA_W-1:0] pend_word;

  always_comb begin
    for (int i = 0; i < 4; i++) rd_mask[2*i +: 2] = {2{ddr_read_en[i]}};
    start   = !phase0 && u_data_valid_en;
    cap_now = start ? (!cas_half && rd_mask[0]) : cap[0];
  end

  always_ff @(posedge clk2x) begin
    if (reset) begin
      cap          <= '0;
      have_lo      <= 1'b0;
      pend         <= 1'b0;
      u_data_valid <= 1'b0;
    end else begin
      if (start) cap <= cas_half ? rd_mask : (rd_mask >> 1);
      else       cap <= cap >> 1;

      if (cap_now) begin
        have_lo <= !have_lo;
        if (!have_lo) lo <= ddr_dq_i;
      end

      if (phase0) begin
        if (cap_now && have_lo) begin
          u_data_o     <= {ddr_dq_i, lo};
          u_data_valid <= 1'b1;
        end else if (pend) begin
          u_data_o     <= pend_word;
          u_data_valid <= 1'b1;
          pend         <= 1'b0;
        end else begin
          u_data_valid <= 1'b0;
        end
      end else if (cap_now && have_lo) begin
        pend_word <= {ddr_dq_i, lo};
        pend      <= 1'b1;
      end
    end
  end

endmodule
