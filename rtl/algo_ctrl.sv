// Central algorithm controller.
// Runs a short microprogram that sets up the macros over the control bus and
// sequences them: the macros then run their local sequences on their own,
// so this controller and its bus can be slow and far away (weak programming).
// Instruction word (50 bits): op[49:48], field a[47:32], field b[31:0]
//   WRITE (0): control-bus write, address a, data b
//   WAIT  (1): wait until done_in[a] has pulsed since the last WAIT on it
//   JUMP  (2): continue at address a
//   HALT  (3): stop (busy falls)
// The program memory is loaded through prog_we/prog_addr/prog_data; 'start'
// runs it from address 0. One instruction per clock; a WRITE drives the bus
// for one clock. The role of the controller follows the source; the
// instruction set is this design's.
module algo_ctrl
  import flexfilm_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 16,
  parameter int unsigned NDONE      = 4,
  localparam int unsigned PA = $clog2(PROG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  logic [PA-1:0]     prog_addr,
  input  logic [49:0]       prog_data,
  input  logic              start,
  input  logic [NDONE-1:0]  done_in,
  output logic              cb_we,
  output logic [CB_AW-1:0]  cb_addr,
  output logic [CB_DW-1:0]  cb_wdata,
  output logic              busy
);
  typedef enum logic [1:0] {OP_WRITE = 2'd0, OP_WAIT = 2'd1, OP_JUMP = 2'd2, OP_HALT = 2'd3} op_e;

  logic [49:0]      prog [PROG_DEPTH];
  logic [PA-1:0]    pc_q;
  logic [NDONE-1:0] seen_q;
  op_e              op;
  logic [15:0]      fa;
  logic [31:0]      fb;

  assign op = op_e'(prog[pc_q][49:48]);
  assign fa = prog[pc_q][47:32];
  assign fb = prog[pc_q][31:0];

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0; seen_q <= '0; busy <= 1'b0;
      cb_we <= 1'b0; cb_addr <= '0; cb_wdata <= '0;
    end else begin
      cb_we  <= 1'b0;
      seen_q <= seen_q | done_in;
      if (start && !busy) begin
        busy <= 1'b1;
        pc_q <= '0;
      end else if (busy) begin
        case (op)
          OP_WRITE: begin
            cb_we    <= 1'b1;
            cb_addr  <= fa;
            cb_wdata <= fb;
            pc_q     <= pc_q + 1'b1;
          end
          OP_WAIT: if (seen_q[fa[$clog2(NDONE)-1:0]]) begin
            seen_q[fa[$clog2(NDONE)-1:0]] <= 1'b0;
            pc_q <= pc_q + 1'b1;
          end
          OP_JUMP: pc_q <= fa[PA-1:0];
          default: busy <= 1'b0;
        endcase
      end
    end
  end
endmodule
