// tb_seg_cell: checks one cell P_ij against a behavioural model.
// Random command sequences with random neighbour states, weights (spread
// around the excitation threshold, including exactly PHI_Z and PHI_Z + 1),
// row enables, selects, segment numbers and shift inputs. The model keeps
// the state (free / excited / inhibited), leader flag and label; every cycle
// the outputs active (stand-by rule), z, cand, excited and ce, and after each
// edge the stored state, are compared. Coverage: excitation by neighbours,
// a blocked excitation at exactly the threshold, self-excitation, labeling,
// stand-by for each of the three reasons, and row gating.
`timescale 1ns/1ps
module tb_seg_cell;
  import seg_pkg::*;
  localparam int W_W = DEF_W_W, LW = 11, PHI_Z = DEF_PHI_Z;

  logic clk = 0, rst_n = 0;
  cell_cmd_t cmd = CMD_HOLD;
  logic row_en = 0, sel = 0, leader_in = 0;
  logic [LW-1:0] seg_num = '0, label_in = '0;
  logic [3:0] nb_exc = '0;
  logic [W_W-1:0] nb_w [4];
  logic excited, leader, cand, active, z, ce;
  logic [LW-1:0] label;

  seg_cell #(.W_W(W_W), .LW(LW), .PHI_Z(PHI_Z)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_state, m_label, s;
  bit m_leader, e_active, e_z, e_ce;
  int n_grow, n_thresh_block, n_self, n_label, n_sb_none, n_sb_exc, n_sb_inh, n_gated;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cmd %s)", what, cmd.name()); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) nb_w[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_state = 0; m_label = 0; m_leader = 0;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      case ($urandom % 16)
        0:          cmd = CMD_CLEAR;
        1, 2:       cmd = CMD_SHIFT;
        3, 4:       cmd = CMD_SELF;
        5, 6, 7, 8: cmd = CMD_GROW;
        9, 10:      cmd = CMD_LABEL;
        11:         cmd = CMD_OUTPUT;
        default:    cmd = CMD_HOLD;
      endcase
      if (it % 500 == 0) cmd = CMD_CLEAR;
      row_en    = ($urandom % 5) != 0;
      sel       = ($urandom % 2);
      leader_in = ($urandom % 2);
      seg_num   = LW'($urandom);
      label_in  = LW'($urandom);
      nb_exc    = 4'($urandom) & 4'($urandom);
      for (int k = 0; k < 4; k++) nb_w[k] = W_W'($urandom % 140);
      if ($urandom % 8 == 0) begin   // exactly at / just above the threshold
        nb_exc = 4'b0100;
        nb_w[2] = W_W'(PHI_Z + ($urandom % 2));
      end
      #1;
      s = 0;
      for (int k = 0; k < 4; k++) if (nb_exc[k]) s += nb_w[k];
      e_active = (m_state == 0) && (nb_exc != 0);
      e_z      = e_active && (s > PHI_Z);
      case (cmd)
        CMD_CLEAR, CMD_SHIFT, CMD_OUTPUT: e_ce = row_en;
        CMD_SELF:  e_ce = row_en && sel;
        CMD_GROW:  e_ce = row_en && e_active;
        CMD_LABEL: e_ce = row_en && (m_state == 1);
        default:   e_ce = 0;
      endcase
      chk(active == e_active, "active");
      chk(z == e_z, "z");
      chk(ce == e_ce, "ce");
      chk(excited == (m_state == 1), "excited");
      chk(cand == (m_leader && m_state == 0), "cand");
      if (cmd == CMD_GROW) begin
        if (m_state == 0 && nb_exc == 0) n_sb_none++;
        if (m_state == 1) n_sb_exc++;
        if (m_state == 2) n_sb_inh++;
        if (e_active && !row_en) n_gated++;
        if (e_active && s == PHI_Z) n_thresh_block++;
      end
      // model update
      if (e_ce)
        case (cmd)
          CMD_CLEAR:  begin m_state = 0; m_leader = 0; m_label = 0; end
          CMD_SHIFT:  m_leader = leader_in;
          CMD_SELF:   if (m_state == 0) begin m_state = 1; n_self++; end
          CMD_GROW:   if (e_z) begin m_state = 1; n_grow++; end
          CMD_LABEL:  begin m_state = 2; m_label = int'(seg_num); n_label++; end
          CMD_OUTPUT: m_label = int'(label_in);
          default: ;
        endcase
      @(posedge clk);
      #1;
      chk(excited == (m_state == 1), "state after edge");
      chk(leader == m_leader, "leader after edge");
      chk(int'(label) == m_label, "label after edge");
    end
    $display("grow=%0d at-threshold=%0d self=%0d label=%0d standby none/exc/inh=%0d/%0d/%0d gated=%0d",
             n_grow, n_thresh_block, n_self, n_label, n_sb_none, n_sb_exc, n_sb_inh, n_gated);
    chk(n_grow > 0 && n_thresh_block > 0 && n_self > 0 && n_label > 0, "coverage of state changes");
    chk(n_sb_none > 0 && n_sb_exc > 0 && n_sb_inh > 0 && n_gated > 0, "coverage of stand-by");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
