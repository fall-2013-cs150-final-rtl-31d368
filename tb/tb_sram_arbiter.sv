// tb_sram_arbiter: four clients with random request queues and a
// behavioural SRAM of latency LAT. Checks each cycle's state against a
// round-robin reference (order W0, W1, R0, R1; from IDLE the first
// requester in that order; from a port state the next requester after
// it, never the same port; IDLE with no request), that every write lands
// in the SRAM model and that every read returns the stored word to the
// port that asked, in order. Counts W0 -> IDLE -> W0 repeats.
module tb_sram_arbiter;
  import dog_pkg::*;
  localparam int unsigned LAT = 2, AW = 6;
  logic clk = 0, rst = 1;
  logic w0_valid, w0_pop, w1_valid, w1_pop;
  sram_wreq_t w0_req, w1_req;
  logic r0_valid, r0_data_full, r0_pop, r0_data_valid;
  logic r1_valid, r1_data_full, r1_pop, r1_data_valid;
  logic [SRAM_AW-1:0] r0_addr, r1_addr;
  logic [SRAM_DW-1:0] rdata;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic [SRAM_MW-1:0] sram_mask;
  arb_state_e state;
  int checks = 0, failures = 0, idle_repeats = 0;
  int served[4] = '{0, 0, 0, 0};

  sram_arbiter #(.SRAM_LAT(LAT)) dut (.*);

  // Behavioural SRAM with read latency LAT.
  logic [SRAM_DW-1:0] mem [2**AW];
  logic [SRAM_DW-1:0] rpipe [LAT];
  always_ff @(posedge clk) begin
    if (sram_en && sram_we)
      for (int b = 0; b < SRAM_MW; b++)
        if (sram_mask[b]) mem[sram_addr[AW-1:0]][b*8 +: 8] <= sram_wdata[b*8 +: 8];
    rpipe[0] <= mem[sram_addr[AW-1:0]];
    for (int i = 1; i < LAT; i++) rpipe[i] <= rpipe[i-1];
  end
  assign sram_rdata = rpipe[LAT-1];

  // Client request queues.
  sram_wreq_t wq0[$], wq1[$];
  logic [SRAM_AW-1:0] rq0[$], rq1[$];
  logic [SRAM_DW-1:0] exp0[$], exp1[$], shadow [2**AW];

  assign w0_valid = wq0.size() > 0;
  assign w1_valid = wq1.size() > 0;
  assign r0_valid = rq0.size() > 0;
  assign r1_valid = rq1.size() > 0;
  assign w0_req = w0_valid ? wq0[0] : '0;
  assign w1_req = w1_valid ? wq1[0] : '0;
  assign r0_addr = r0_valid ? rq0[0] : '0;
  assign r1_addr = r1_valid ? rq1[0] : '0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic arb_state_e ref_next(input arb_state_e s, input logic [3:0] req);
    arb_state_e order[4] = '{ARB_W0, ARB_W1, ARB_R0, ARB_R1};
    int start;
    start = (s == ARB_IDLE) ? 0 : (int'(s) - 1 + 1);
    for (int i = 0; i < 4; i++) begin
      int j = (start + i) % 4;
      if (s != ARB_IDLE && order[j] == s) continue;
      if (req[j]) return order[j];
    end
    return ARB_IDLE;
  endfunction

  arb_state_e prev_state, prev2_state;
  logic [3:0] prev_req, pops;

  initial begin
    r0_data_full = 0; r1_data_full = 0;
    foreach (mem[i]) begin mem[i] = '0; shadow[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // state check against the reference from last cycle's requests
      if (cyc > 0) chk(state == ref_next(prev_state, prev_req), "round-robin next state");
      if (cyc > 1 && prev2_state == ARB_W0 && prev_state == ARB_IDLE && state == ARB_W0) idle_repeats++;
      // new requests (reads only of addresses already written are
      // predicted through the shadow copy at issue time)
      if ($urandom_range(0, 99) < (cyc < 2500 ? 20 : 80)) wq0.push_back('{addr: SRAM_AW'($urandom_range(0, 2**AW-1)), data: $urandom, mask: SRAM_MW'($urandom)});
      if (cyc < 2500 && $urandom_range(0, 99) < ((cyc / 600) % 2 ? 5 : 15)) wq1.push_back('{addr: SRAM_AW'($urandom_range(0, 2**AW-1)), data: $urandom, mask: '1});
      if (cyc < 2500 && $urandom_range(0, 99) < 15) rq0.push_back(SRAM_AW'($urandom_range(0, 2**AW-1)));
      if (cyc < 2500 && $urandom_range(0, 99) < 10) rq1.push_back(SRAM_AW'($urandom_range(0, 2**AW-1)));
      r0_data_full = ($urandom_range(0, 9) == 0);
      r1_data_full = ($urandom_range(0, 9) == 0);
      #1;
      chk(sram_en == (state != ARB_IDLE), "sram_en");
      if (r0_data_valid) begin chk(exp0.size() > 0 && rdata == exp0[0], "r0 read data"); void'(exp0.pop_front()); end
      if (r1_data_valid) begin chk(exp1.size() > 0 && rdata == exp1[0], "r1 read data"); void'(exp1.pop_front()); end
      // requests as the arbiter sees them at the coming clock edge
      prev2_state = prev_state;
      prev_state = state;
      prev_req = {r1_valid && !r1_data_full, r0_valid && !r0_data_full, w1_valid, w0_valid};
      pops = {r1_pop, r0_pop, w1_pop, w0_pop};
      // the clients pop their queues at the clock edge
      @(posedge clk);
      #1;
      if (pops[0]) begin automatic sram_wreq_t q = wq0.pop_front(); served[0]++;
        for (int b = 0; b < 4; b++) if (q.mask[b]) shadow[q.addr[AW-1:0]][b*8 +: 8] = q.data[b*8 +: 8]; end
      if (pops[1]) begin automatic sram_wreq_t q = wq1.pop_front(); served[1]++;
        for (int b = 0; b < 4; b++) if (q.mask[b]) shadow[q.addr[AW-1:0]][b*8 +: 8] = q.data[b*8 +: 8]; end
      if (pops[2]) begin automatic logic [SRAM_AW-1:0] a = rq0.pop_front(); served[2]++; exp0.push_back(shadow[a[AW-1:0]]); end
      if (pops[3]) begin automatic logic [SRAM_AW-1:0] a = rq1.pop_front(); served[3]++; exp1.push_back(shadow[a[AW-1:0]]); end
    end
    foreach (served[i]) chk(served[i] > 50, "every port served");
    chk(idle_repeats > 0, "W0 repeat passes through IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
