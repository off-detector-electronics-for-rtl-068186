// tb_sca_controller: small SCA (16 cells, latency 6 samples) driven with a
// bunch-crossing strobe every second clock. The testbench keeps its own
// history of the write cells seen on the control word and checks that
//  - a new write cell arrives every second crossing (50 ns),
//  - no cell is written again while it is inside the latency window or
//    held for a pending readout,
//  - each accepted trigger reads the four cells written 6..3 samples before
//    it, oldest first,
//  - after a trigger flood the trigger queue fills (busy, lost triggers),
//    the free list runs dry (write overflows), and every cell comes back.
module tb_sca_controller;
  localparam int NC = 16, LAT = 6, RB = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bc_en, l1a, ctrl_valid, busy, ready;
  logic [16:0] ctrl_word;
  logic [15:0] lost_triggers, write_overflows;
  logic [4:0] free_cells;
  sca_controller #(.N_CELLS(NC), .LATENCY_SAMPLES(LAT), .BC_PER_SAMPLE(2), .READ_BC(RB),
                   .TRIG_DEPTH(4), .BUSY_LEVEL(3)) dut (.*);

  int checks = 0, failures = 0;
  int h [$];             // write cell of every sample seen
  int bc = 0, last_new_bc = -1;
  int expr [$];          // expected read cells
  int held [$];          // cells of accepted triggers
  int held_until [$];    // crossing from which the cell may be reused
  int nreads = 0;
  bit checking = 1, busy_seen = 0;
  int last_wr = -1;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s (bc %0d)", s, bc);
  endtask

  // one crossing every two clocks; the controller's outputs are looked at
  // just after the crossing's rising edge
  task automatic crossing(input bit trig);
    @(negedge clk);
    bc_en = 1; l1a = trig;
    if (trig && checking) begin
      // pre-shift used list holds h[$] (newest) .. h[$-LAT]
      for (int k = 0; k < 4; k++) begin
        expr.push_back(h[h.size()-1-LAT+k]);
        held.push_back(h[h.size()-1-LAT+k]);
        held_until.push_back(1 << 30);
      end
    end
    @(negedge clk);
    bc_en = 0; l1a = 0;
    bc++;
    if (busy) busy_seen = 1;
    if (ctrl_valid) begin
      int w, r;
      w = ctrl_word[7:0];
      if (w != last_wr) begin
        // a new sample: check the cell is not in use
        if (checking) begin
          checks++;
          if (last_new_bc >= 0 && bc - last_new_bc != 2) fail("sample spacing");
          for (int i = 1; i < LAT && i <= h.size(); i++)
            if (h[h.size()-i] == w) fail($sformatf("cell %0d reused inside latency", w));
          for (int i = 0; i < held.size(); i++)
            if (held[i] == w && bc < held_until[i]) fail($sformatf("held cell %0d reused", w));
        end
        h.push_back(w);
        last_new_bc = bc;
        last_wr = w;
      end
      if (ctrl_word[16]) begin
        r = ctrl_word[15:8];
        nreads++;
        if (checking) begin
          checks++;
          if (expr.size() == 0 || expr[0] != r) fail($sformatf("read cell %0d", r));
          if (expr.size()) void'(expr.pop_front());
          if (nreads % 4 == 0)
            for (int i = 0; i < held.size(); i++)
              if (held_until[i] == (1 << 30)) held_until[i] = bc + RB;
        end
      end
    end
  endtask

  initial begin
    bc_en = 0; l1a = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (!ready) @(negedge clk);
    repeat (40) crossing(0);
    // isolated and overlapping triggers
    for (int t = 0; t < 20; t++) begin
      crossing(1);
      repeat ($urandom_range(1, 3)) crossing(0);
      crossing(1);
      repeat ($urandom_range(60, 90)) crossing(0);
    end
    repeat (400) crossing(0);
    checks += 2;
    if (expr.size() != 0) fail("reads missing");
    if (free_cells != 5'(NC - LAT - 1)) fail($sformatf("free cells %0d", free_cells));
    // flood: overflow of the trigger queue and of the free list
    checking = 0;
    repeat (40) crossing(1);
    repeat (1500) crossing(0);
    checks += 4;
    if (lost_triggers == 0) fail("no lost trigger");
    if (!busy_seen) fail("busy never seen");
    if (write_overflows == 0) fail("no write overflow");
    if (free_cells != 5'(NC - LAT - 1)) fail($sformatf("free cells after flood %0d", free_cells));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
