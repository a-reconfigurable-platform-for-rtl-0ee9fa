// Testbench for ppc_line_buffer with a simple memory-port responder (random
// accept delay, four read beats after a short latency). Random CPU line reads
// and writes over a few bursts are checked against a reference memory; a read
// of the other line of the buffered burst must be a hit with no memory
// request, and writes must carry the beat mask of their line.
module ppc_line_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cpu_req, cpu_we, cpu_ack, cpu_hit;
  logic [22:0] cpu_addr;
  logic [127:0] cpu_wdata [2], cpu_rdata [2];
  logic mem_valid, mem_ready, mem_we, rd_valid, rd_mine;
  logic [21:0] mem_addr;
  logic [127:0] mem_wdata [4], rd_data;
  logic [3:0] mem_wmask;
  ppc_line_buffer #(.AW(22), .DW(128), .BEATS(4), .LINE_BEATS(2)) dut (.*);
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic [127:0] mem [int];
  function automatic logic [127:0] rd(int a, int k);
    return mem.exists(a * 4 + k) ? mem[a * 4 + k] : {4{32'(a * 4 + k)}};
  endfunction
  int n_mem = 0, n_hit = 0;

  // memory responder
  initial begin
    mem_ready = 0; rd_valid = 0; rd_mine = 1; rd_data = 0;
    forever begin
      @(negedge clk);
      if (mem_valid && $urandom_range(0, 2) == 0) begin
        int a; logic we;
        a = int'(mem_addr); we = mem_we;
        mem_ready = 1;
        if (we) for (int k = 0; k < 4; k++) if (mem_wmask[k]) mem[a * 4 + k] = mem_wdata[k];
        n_mem++;
        @(negedge clk); mem_ready = 0;
        if (!we) begin
          repeat (3) @(negedge clk);
          for (int k = 0; k < 4; k++) begin rd_valid = 1; rd_data = rd(a, k); @(negedge clk); end
          rd_valid = 0;
        end
      end
    end
  end

  task automatic cpu(input bit we, input int la);
    logic [127:0] w0, w1;
    int nm;
    nm = n_mem;
    w0 = {4{$urandom}}; w1 = {4{$urandom}};
    @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = 23'(la); cpu_wdata[0] = w0; cpu_wdata[1] = w1;
    @(posedge clk); while (!cpu_ack) @(posedge clk);
    if (!we) begin
      chk(cpu_rdata[0] == rd(la / 2, (la % 2) * 2) && cpu_rdata[1] == rd(la / 2, (la % 2) * 2 + 1), $sformatf("read line %0d", la));
      if (cpu_hit) begin n_hit++; chk(n_mem == nm, "hit but memory was used"); end
    end else begin
      chk(mem.exists((la / 2) * 4 + (la % 2) * 2) && mem[(la / 2) * 4 + (la % 2) * 2] == w0 && mem[(la / 2) * 4 + (la % 2) * 2 + 1] == w1, "write data");
    end
    @(negedge clk); cpu_req = 0;
  endtask

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = '{0, 0};
    repeat (3) @(posedge clk); rst_n = 1;
    cpu(0, 20); cpu(0, 21);           // second line of the same burst: hit
    chk(n_hit == 1, "expected a hit");
    cpu(1, 21); cpu(0, 21); cpu(0, 20);
    for (int i = 0; i < 200; i++) cpu($urandom_range(0, 3) == 0, int'($urandom_range(0, 15)));
    $display("memory accesses %0d, hits %0d", n_mem, n_hit);
    chk(n_hit > 20, "few hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
