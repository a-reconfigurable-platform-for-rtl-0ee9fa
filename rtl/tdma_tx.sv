// TDMA sender for one FPGA-to-FPGA link.
// Several word streams share one channel that moves one word per clock. A
// programmable slot table (SLOTS entries, sched_len of them in use) names the
// stream owning each clock; the packet size is one word, so a schedule such as
// 1-2-1-2-1 interleaves words rather than bursts, which keeps the buffers at
// both ends small. The stream number of each slot and a start-of-schedule mark
// travel beside the data on extra control lines instead of in packet headers.
// Each stream has a FIFO of FIFO_DEPTH words (valid/ready in). If the slot's
// stream has no word, the slot goes out idle (link_valid=0): the bandwidth is
// reserved, as TDMA requires. Outputs are registered: a word written into an
// empty FIFO can leave on the next slot owned by its stream, one clock later at
// the earliest. The slot table register file and idle-slot rule are this
// design's choices; the TDMA principle and one-word packets follow the source.
module tdma_tx #(
  parameter int unsigned NSTREAMS   = 2,
  parameter int unsigned DW         = 64,
  parameter int unsigned SLOTS      = 8,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned SW = (NSTREAMS > 1) ? $clog2(NSTREAMS) : 1,
  localparam int unsigned TW = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned FW = $clog2(FIFO_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NSTREAMS-1:0]  s_valid,
  output logic [NSTREAMS-1:0]  s_ready,
  input  logic [DW-1:0]        s_data [NSTREAMS],
  input  logic                 sched_we,
  input  logic [TW-1:0]        sched_addr,
  input  logic [SW-1:0]        sched_sid,
  input  logic [TW:0]          sched_len,
  output logic [DW-1:0]        link_data,
  output logic                 link_valid,
  output logic [SW-1:0]        link_sid,
  output logic                 link_sof
);
  logic [SW-1:0] table_q [SLOTS];
  logic [TW-1:0] slot_q;

  logic [DW-1:0] fifo_mem [NSTREAMS][FIFO_DEPTH];
  logic [FW-1:0] rd_ptr [NSTREAMS];
  logic [FW-1:0] wr_ptr [NSTREAMS];
  logic [FW:0]   count  [NSTREAMS];

  logic [SW-1:0] cur_sid;
  logic [NSTREAMS-1:0] pop;

  assign cur_sid = table_q[slot_q];

  always_comb begin
    for (int s = 0; s < NSTREAMS; s++) begin
      s_ready[s] = (count[s] != (FW+1)'(FIFO_DEPTH));
      pop[s]     = (cur_sid == SW'(s)) && (count[s] != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      for (int i = 0; i < SLOTS; i++) table_q[i] <= SW'(i % NSTREAMS);
      for (int s = 0; s < NSTREAMS; s++) begin
        rd_ptr[s] <= '0; wr_ptr[s] <= '0; count[s] <= '0;
      end
      link_data  <= '0;
      link_valid <= 1'b0;
      link_sid   <= '0;
      link_sof   <= 1'b0;
    end else begin
      if (sched_we) table_q[sched_addr] <= sched_sid;
      // slot counter wraps at the programmed schedule length
      if ((TW+1)'(slot_q) + 1'b1 >= sched_len) slot_q <= '0;
      else slot_q <= slot_q + 1'b1;
      link_sid   <= cur_sid;
      link_sof   <= (slot_q == '0);
      link_valid <= 1'b0;
      for (int s = 0; s < NSTREAMS; s++) begin
        if (s_valid[s] && s_ready[s]) begin
          fifo_mem[s][wr_ptr[s]] <= s_data[s];
          wr_ptr[s] <= (wr_ptr[s] == FW'(FIFO_DEPTH-1)) ? '0 : wr_ptr[s] + 1'b1;
        end
        if (pop[s]) begin
          link_data  <= fifo_mem[s][rd_ptr[s]];
          link_valid <= 1'b1;
          rd_ptr[s]  <= (rd_ptr[s] == FW'(FIFO_DEPTH-1)) ? '0 : rd_ptr[s] + 1'b1;
        end
        count[s] <= count[s] + (FW+1)'(s_valid[s] && s_ready[s]) - (FW+1)'(pop[s]);
      end
    end
  end
endmodule
