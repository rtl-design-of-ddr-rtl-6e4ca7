// ddr_sdram_model: behavioural model of a 4-bank, 64-bit DDR SDRAM.
//
// Not synthesizable; used by the testbenches as the memory on the far side
// of the controller. It decodes commands on the rising edge of ddr_clk
// (cs_n low, CKE high), keeps the mode registers, one open row per bank and
// the data of every written beat. It checks the rules a real part imposes
// and counts each broken rule in `errors`:
//   - the power-up order (PRECHARGE ALL, EMR with DLL enabled, MR with DLL
//     reset, PRECHARGE ALL, two AUTO REFRESH) before the first ACT,
//   - no command while CKE is low,
//   - ACT only to an idle bank, after tRP / tRFC / tMRD and tRC,
//   - READ/WRITE only to an open bank, tRCD after ACT,
//   - REFRESH and LOAD MODE REGISTER only with all banks idle,
//   - the first write DQS rising edge 0.75 to 1.25 clocks after WRITE,
//   - never both sides driving DQ at once.
// Reads return the burst on DQ edge-aligned with both edges of ddr_clk,
// CAS latency (2, 2.5 or 3) after the READ; writes are taken on both edges
// of DQS. Bursts are sequential within the burst-length-aligned block.
// Every READ and WRITE uses auto precharge when A10 is set.
module ddr_sdram_model #(
  parameter int T_RCD = 3,
  parameter int T_RP  = 3,
  parameter int T_RFC = 8,
  parameter int T_MRD = 2,
  parameter int T_WR  = 2,
  parameter int T_RC  = 7
) (
  input  logic        ddr_clk,
  input  logic        ddr_cke,
  input  logic        ddr_csb,
  input  logic        ddr_rasb,
  input  logic        ddr_casb,
  input  logic        ddr_web,
  input  logic [1:0]  ddr_ba,
  input  logic [11:0] ddr_ad,
  input  logic [63:0] dq_in,      // controller's DQ output
  input  logic        dq_in_oe,
  input  logic        dqs_in,     // controller's DQS output (one lane)
  input  logic        dqs_in_oe,
  output logic [63:0] dq_out,     // model's DQ output
  output logic        dq_out_oe
);

  int errors = 0;
  int n_act = 0, n_read = 0, n_write = 0, n_pre = 0, n_ref = 0, n_mrs = 0;
  int n_beats_written = 0, n_beats_read = 0;

  logic [63:0] mem [bit [21:0]];

  logic [11:0] mr = '0, emr = '0;
  bit          bank_open [4];
  logic [11:0] open_row  [4];
  longint      act_cyc   [4];
  longint      ready_cyc [4];   // bank may be activated from this cycle
  longint      any_ready_cyc;   // refresh / MRS constraint on ACT
  longint      cyc = 0;
  int          init_step = 0;   // 7 = initialised
  realtime     last_rise = 0, tck = 0, wr_cmd_time = 0;

  // scheduled read beats: edge index and data
  longint      rd_edge [$];
  logic [63:0] rd_data [$];
  longint      edge_idx = 0;

  // pending write bursts
  logic [21:0] wr_addr [$];
  int          wr_left = 0, wr_done_in_burst = 0;

  function automatic int bl();
    case (mr[2:0])
      3'b001:  return 2;
      3'b011:  return 8;
      default: return 4;
    endcase
  endfunction

  function automatic int cl_half();  // CAS latency in half clocks
    case (mr[6:4])
      3'b011:  return 6;
      3'b110:  return 5;
      default: return 4;
    endcase
  endfunction

  function automatic logic [7:0] burst_col(input logic [7:0] col, input int i, input int len);
    logic [7:0] m;
    m = 8'(len - 1);
    return (col & ~m) | ((col + 8'(i)) & m);
  endfunction

  task automatic err(input string msg);
    errors++;
    $display("%t MEMORY MODEL ERROR: %s", $realtime, msg);
  endtask

  function automatic bit all_idle();
    for (int b = 0; b < 4; b++) if (bank_open[b] || ready_cyc[b] > cyc) return 0;
    return 1;
  endfunction

  initial begin
    for (int b = 0; b < 4; b++) begin
      bank_open[b] = 0; ready_cyc[b] = 0; act_cyc[b] = -100; open_row[b] = '0;
    end
    any_ready_cyc = 0;
    dq_out = '0;
    dq_out_oe = 0;
  end

  // Command decode on the rising edge.
  task automatic decode();
    logic [2:0] c;
    int b;
    cyc++;
    if (last_rise != 0) tck = $realtime - last_rise;
    last_rise = $realtime;
    b = int'(ddr_ba);
    c = {ddr_rasb, ddr_casb, ddr_web};
    if (!ddr_cke) begin
      if (!ddr_csb && c != 3'b111) err("command while CKE low");
    end else if (!ddr_csb) begin
      case (c)
        3'b011: begin  // ACT
          n_act++;
          if (init_step != 7) err("ACT before initialisation finished");
          if (bank_open[b]) err("ACT to an open bank");
          if (cyc < ready_cyc[b]) err($sformatf("ACT to bank %0d before tRP/tWR", b));
          if (cyc < any_ready_cyc) err("ACT before tRFC/tMRD");
          if (cyc - act_cyc[b] < T_RC) err("ACT to ACT below tRC");
          bank_open[b] = 1; open_row[b] = ddr_ad; act_cyc[b] = cyc;
        end
        3'b101, 3'b100: begin  // READ / WRITE
          logic [7:0] col;
          col = ddr_ad[7:0];
          if (!bank_open[b]) err("READ/WRITE to a closed bank");
          if (cyc - act_cyc[b] < T_RCD) err("READ/WRITE below tRCD");
          if (c == 3'b101) begin
            n_read++;
            for (int i = 0; i < bl(); i++) begin
              logic [21:0] a;
              a = {ddr_ba, open_row[b], burst_col(col, i, bl())};
              rd_edge.push_back(edge_idx + longint'(cl_half()) + i);
              rd_data.push_back(mem.exists(a) ? mem[a] : 64'h0);
            end
            if (ddr_ad[10]) begin
              bank_open[b] = 0;
              ready_cyc[b] = cyc + bl() / 2 + T_RP;
            end
          end else begin
            n_write++;
            wr_cmd_time = $realtime;
            for (int i = 0; i < bl(); i++)
              wr_addr.push_back({ddr_ba, open_row[b], burst_col(col, i, bl())});
            wr_left += bl();
            if (ddr_ad[10]) begin
              bank_open[b] = 0;
              ready_cyc[b] = cyc + 1 + bl() / 2 + T_WR + T_RP;
            end
          end
        end
        3'b010: begin  // PRECHARGE
          n_pre++;
          if (ddr_ad[10]) begin
            for (int k = 0; k < 4; k++) begin
              if (bank_open[k]) bank_open[k] = 0;
              if (ready_cyc[k] < cyc + T_RP) ready_cyc[k] = cyc + T_RP;
            end
          end else begin
            bank_open[b] = 0;
            ready_cyc[b] = cyc + T_RP;
          end
          if (init_step == 0 || init_step == 3) init_step++;
          else if (init_step < 7) err("PRECHARGE out of power-up order");
        end
        3'b001: begin  // AUTO REFRESH
          n_ref++;
          if (!all_idle()) err("REFRESH with a bank not idle");
          if (cyc < any_ready_cyc) err("REFRESH before tRFC/tMRD");
          any_ready_cyc = cyc + T_RFC;
          if (init_step == 4) init_step = 5;
          else if (init_step == 5) init_step = 7;
          else if (init_step < 7) err("REFRESH out of power-up order");
        end
        3'b000: begin  // LOAD MODE REGISTER
          n_mrs++;
          if (!all_idle()) err("LOAD MODE REGISTER with a bank not idle");
          if (cyc < any_ready_cyc) err("LOAD MODE REGISTER before tRFC/tMRD");
          any_ready_cyc = cyc + T_MRD;
          if (ddr_ba == 2'b01) begin
            emr = ddr_ad;
            if (init_step == 1) begin
              if (ddr_ad[0]) err("power-up EMR leaves the DLL disabled");
              init_step++;
            end else if (init_step < 7) err("EMR out of power-up order");
          end else if (ddr_ba == 2'b00) begin
            mr = ddr_ad;
            if (init_step == 2) begin
              if (!ddr_ad[8]) err("power-up MR does not reset the DLL");
              init_step++;
            end else if (init_step < 7) err("MR out of power-up order");
          end else err("LOAD MODE REGISTER to a reserved bank");
        end
        default: ;
      endcase
    end
  endtask

  // Read data, edge-aligned with both clock edges.
  always @(ddr_clk) begin
    edge_idx++;
    if (ddr_clk) decode();
    if (rd_edge.size() != 0 && rd_edge[0] == edge_idx) begin
      void'(rd_edge.pop_front());
      dq_out    = rd_data.pop_front();
      dq_out_oe = 1;
      n_beats_read++;
    end else begin
      dq_out_oe = 0;
    end
    if (dq_out_oe && dq_in_oe) err("DQ driven by both sides");
  end

  // Write data on both DQS edges.
  always @(dqs_in) begin
    if (dqs_in_oe && wr_left > 0) begin
      if (wr_done_in_burst == 0) begin
        if (!dqs_in) err("first write DQS edge is falling");
        if (tck > 0 && (($realtime - wr_cmd_time) < 0.75 * tck ||
                        ($realtime - wr_cmd_time) > 1.25 * tck))
          err("write DQS outside tDQSS");
      end
      if (!dq_in_oe) err("write beat without DQ driven");
      mem[wr_addr.pop_front()] = dq_in;
      wr_left--;
      wr_done_in_burst = (wr_done_in_burst + 1) % bl();
      n_beats_written++;
    end
  end

endmodule
