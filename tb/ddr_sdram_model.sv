// Behavioural model of a 4-bank DDR SDRAM as seen by the memory controller
// (one 128-bit word per controller clock, 4-word bursts, auto precharge).
// Stores written bursts with beat masks, returns read data CL clocks after
// READ-AP, and counts protocol violations: ACTIVATE to a bank that is not
// idle, column command without an open row or before tRCD, a second command
// in the same clock is impossible by construction. Not synthesizable.
module ddr_sdram_model
  import flexfilm_pkg::*;
#(
  parameter int unsigned CL = 3, T_RCD = 3, T_RP = 3, T_WR = 3, T_RFC = 10, BEATS = 4
) (
  input  logic         clk,
  input  sd_cmd_e      sd_cmd,
  input  logic [1:0]   sd_bank,
  input  logic [12:0]  sd_addr,
  input  logic [127:0] sd_dq_o,
  input  logic         sd_dq_oe,
  input  logic [3:0]   sd_dm,
  output logic [127:0] sd_dq_i,
  output int           violations,
  output int           n_ref,
  output int           n_act,
  output int           n_cas,
  output int           n_turn
);
  logic [127:0] mem [int];
  longint cyc = 0;
  longint act_t [4], free_t [4];
  logic   open_b [4];
  logic [12:0] row_b [4];
  logic [127:0] rq [longint];
  int     wbase [longint];     // cycle -> key base for write beat
  int     wbeat [longint];
  int     last_dir = -1;

  initial begin
    violations = 0; n_ref = 0; n_act = 0; n_cas = 0; n_turn = 0; sd_dq_i = '0;
    for (int b = 0; b < 4; b++) begin act_t[b] = 0; free_t[b] = 0; open_b[b] = 0; row_b[b] = 0; end
  end

  always @(posedge clk) begin
    // write beats due in this cycle
    if (wbase.exists(cyc)) begin
      if (!sd_dq_oe) violations++;
      if (!sd_dm[wbeat[cyc]]) mem[wbase[cyc] + wbeat[cyc]] = sd_dq_o;
      wbase.delete(cyc);
    end
    case (sd_cmd)
      SD_ACT: begin
        n_act++;
        if (open_b[sd_bank] || cyc < free_t[sd_bank]) violations++;
        open_b[sd_bank] = 1; row_b[sd_bank] = sd_addr; act_t[sd_bank] = cyc;
      end
      SD_RDA, SD_WRA: begin
        int key;
        n_cas++;
        if (!open_b[sd_bank] || cyc < act_t[sd_bank] + T_RCD) violations++;
        if (last_dir != -1 && last_dir != int'(sd_cmd == SD_WRA)) n_turn++;
        last_dir = int'(sd_cmd == SD_WRA);
        key = ((int'(row_b[sd_bank]) * 128 + int'(sd_addr[6:0])) * 4 + int'(sd_bank)) * BEATS;
        open_b[sd_bank] = 0;
        if (sd_cmd == SD_RDA) begin
          free_t[sd_bank] = cyc + BEATS + T_RP;
          for (int k = 0; k < BEATS; k++)
            rq[cyc + CL + k] = mem.exists(key + k) ? mem[key + k] : 128'(key + k);
        end else begin
          free_t[sd_bank] = cyc + 1 + BEATS + T_WR + T_RP;
          for (int k = 0; k < BEATS; k++) begin wbase[cyc + 1 + k] = key; wbeat[cyc + 1 + k] = k; end
        end
      end
      SD_REF: begin
        n_ref++;
        for (int b = 0; b < 4; b++) begin
          if (open_b[b] || cyc < free_t[b]) violations++;
          free_t[b] = cyc + T_RFC;
        end
      end
      default: ;
    endcase
    cyc++;
    if (rq.exists(cyc)) begin sd_dq_i <= rq[cyc]; rq.delete(cyc); end
    else sd_dq_i <= '0;
  end
endmodule
