// Traffic shaper for high-priority (CPU) memory requests.
// Allows at most cfg_n grants within any window of cfg_t clocks (the
// "n requests in T cycles" pattern). It remembers the time stamps of the last
// NMAX grants; a new grant is allowed when fewer than cfg_n of them lie within
// the last cfg_t clocks, i.e. when the cfg_n-th most recent grant is at least
// cfg_t clocks old. 'allow' is combinational from registers; 'grant' is the
// scheduler telling it that a shaped request was taken this clock. With
// cfg_en low every request is allowed. The window rule follows the source;
// the time-stamp implementation is this design's.
module traffic_shaper #(
  parameter int unsigned NMAX = 4,
  parameter int unsigned TW   = 8,
  localparam int unsigned NW  = $clog2(NMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_en,
  input  logic [TW-1:0] cfg_t,
  input  logic [NW-1:0] cfg_n,
  input  logic          grant,
  output logic          allow
);
  // age of the last NMAX grants, saturating; index 0 = most recent
  logic [TW-1:0] age_q [NMAX];
  logic [NMAX-1:0] used_q;

  always_comb begin
    allow = 1'b1;
    if (cfg_en) begin
      if (cfg_n == '0) allow = 1'b0;
      else if (cfg_n <= NW'(NMAX)) begin
        // the cfg_n-th most recent grant must be older than the window
        for (int i = 0; i < NMAX; i++)
          if (NW'(i + 1) == cfg_n && used_q[i] && age_q[i] < cfg_t) allow = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q <= '0;
      for (int i = 0; i < NMAX; i++) age_q[i] <= '0;
    end else begin
      for (int i = 0; i < NMAX; i++)
        if (age_q[i] != '1) age_q[i] <= age_q[i] + 1'b1;
      if (grant) begin
        age_q[0]  <= TW'(1);
        used_q[0] <= 1'b1;
        for (int i = 1; i < NMAX; i++) begin
          age_q[i]  <= (age_q[i-1] != '1) ? age_q[i-1] + 1'b1 : age_q[i-1];
          used_q[i] <= used_q[i-1];
        end
      end
    end
  end
endmodule
