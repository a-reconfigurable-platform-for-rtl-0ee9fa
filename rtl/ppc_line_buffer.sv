// CPU-to-memory-controller interface with a one-burst line buffer.
// The CPU caches move lines of LINE_BEATS controller words (4 words of
// 64 bit); one SDRAM burst holds BEATS/LINE_BEATS such lines. The buffer keeps
// the last burst read, so a read miss whose line lies in that burst is answered
// without a memory access. Writes go to memory with a beat mask covering only
// their line, and also update the buffered burst when it holds that address.
// Handshake: cpu_req is held until cpu_ack (one clock pulse); cpu_addr is a
// line address (burst address & line index in the low bits). The burst buffer
// and the line sizes follow the source; the write policy is this design's.
module ppc_line_buffer
  import flexfilm_pkg::*;
#(
  parameter int unsigned AW         = 22,
  parameter int unsigned DW         = 128,
  parameter int unsigned BEATS      = 4,
  parameter int unsigned LINE_BEATS = 2,
  localparam int unsigned LPB = BEATS / LINE_BEATS,       // lines per burst
  localparam int unsigned LW  = (LPB > 1) ? $clog2(LPB) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cpu_req,
  input  logic                cpu_we,
  input  logic [AW+LW-1:0]    cpu_addr,
  input  logic [DW-1:0]       cpu_wdata [LINE_BEATS],
  output logic                cpu_ack,
  output logic [DW-1:0]       cpu_rdata [LINE_BEATS],
  output logic                cpu_hit,     // last ack was served from the buffer
  // one controller port
  output logic                mem_valid,
  input  logic                mem_ready,
  output logic                mem_we,
  output logic [AW-1:0]       mem_addr,
  output logic [DW-1:0]       mem_wdata [BEATS],
  output logic [BEATS-1:0]    mem_wmask,
  input  logic                rd_valid,
  input  logic                rd_mine,     // read beat belongs to this port
  input  logic [DW-1:0]       rd_data
);
  typedef enum logic [1:0] {IDLE, REQ, WAIT_RD} state_e;
  state_e state;

  logic             buf_v;
  logic [AW-1:0]    buf_addr;
  logic [DW-1:0]    buf_data [BEATS];
  logic [$clog2(BEATS)-1:0] beat;
  logic [AW-1:0]    burst;
  logic [LW-1:0]    line;

  assign burst = cpu_addr[AW+LW-1:LW];
  assign line  = cpu_addr[LW-1:0];

  always_comb begin
    for (int k = 0; k < BEATS; k++) begin
      mem_wdata[k] = cpu_wdata[k % LINE_BEATS];
      mem_wmask[k] = ((k / LINE_BEATS) == int'(line));
    end
    for (int k = 0; k < LINE_BEATS; k++)
      cpu_rdata[k] = buf_data[int'(line) * LINE_BEATS + k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      buf_v     <= 1'b0;
      buf_addr  <= '0;
      for (int k = 0; k < BEATS; k++) buf_data[k] <= '0;
      beat      <= '0;
      cpu_ack   <= 1'b0;
      cpu_hit   <= 1'b0;
      mem_valid <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
    end else begin
      cpu_ack <= 1'b0;
      case (state)
        IDLE: if (cpu_req && !cpu_ack) begin
          if (!cpu_we && buf_v && buf_addr == burst) begin
            cpu_ack <= 1'b1;
            cpu_hit <= 1'b1;
          end else begin
            mem_valid <= 1'b1;
            mem_we    <= cpu_we;
            mem_addr  <= burst;
            state     <= REQ;
          end
        end
        REQ: if (mem_ready) begin
          mem_valid <= 1'b0;
          if (mem_we) begin
            if (buf_v && buf_addr == burst)
              for (int k = 0; k < LINE_BEATS; k++)
                buf_data[int'(line) * LINE_BEATS + k] <= cpu_wdata[k];
            cpu_ack <= 1'b1;
            cpu_hit <= 1'b0;
            state   <= IDLE;
          end else begin
            beat  <= '0;
            buf_v <= 1'b0;
            state <= WAIT_RD;
          end
        end
        WAIT_RD: if (rd_valid && rd_mine) begin
          buf_data[beat] <= rd_data;
          beat <= beat + 1'b1;
          if (beat == $clog2(BEATS)'(BEATS - 1)) begin
            buf_v    <= 1'b1;
            buf_addr <= burst;
            cpu_ack  <= 1'b1;
            cpu_hit  <= 1'b0;
            state    <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
