// tb_workload_500_frames: a run of 500 CS-4 radio blocks through the EDC
// co-processor at its default size, in the way a receiver uses it.
//
// The host model checks each block's BCS itself and calls the co-processor
// only for blocks that fail, running section after section (up to 7) and
// stopping at the first section that reports a pass; it then flips the
// reported bit. Of the 500 blocks, 70 carry one bit error and 30 carry two
// (positions random), the rest none. Every single-error block must come
// back repaired and equal to the block as sent; no double-error block may
// be "repaired" into a block that passes yet differs from the one sent
// without being counted. The run prints the number of blocks recovered,
// which is the number of retransmissions saved, and the worst bus-cycle
// count spent on one block.
module tb_workload_500_frames;
  import gprs_edc_pkg::*;
  import tb_gprs_pkg::*;

  localparam int N = 64, NS = 7, FRAMES = 500, N_SINGLE = 70, N_DOUBLE = 30;

  logic clk = 1'b0, reset;
  logic ce_n, rd_n, wr_n;
  logic [1:0] addr;
  logic [15:0] data_in, data_out;
  logic data_oe;
  int checks = 0, failures = 0;
  longint cycle = 0;

  gprs_edc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(logic [1:0] a, logic [15:0] d);
    ce_n = 1'b0; wr_n = 1'b0; addr = a; data_in = d;
    @(posedge clk); #1;
    wr_n = 1'b1; ce_n = 1'b1;
    @(posedge clk); #1;
  endtask

  task automatic bus_read(logic [1:0] a, output logic [15:0] d);
    ce_n = 1'b0; rd_n = 1'b0; addr = a;
    #1; d = data_out;
    ce_n = 1'b1; rd_n = 1'b1;
  endtask

  initial begin
    blk_t sent, rx;
    int n, nerr, e1, e2, recovered, miscorrected, called, sections, max_sections;
    longint t0, worst;
    logic [15:0] st, rs;
    bit fixed;
    int kind[FRAMES];
    int j, tmp, used;

    recovered = 0; miscorrected = 0; called = 0; sections = 0; max_sections = 0; worst = 0;
    foreach (kind[i]) kind[i] = (i < N_SINGLE) ? 1 : (i < N_SINGLE + N_DOUBLE) ? 2 : 0;
    // shuffle the error pattern over the run
    for (int i = FRAMES - 1; i > 0; i--) begin
      j = $urandom_range(0, i);
      tmp = kind[i]; kind[i] = kind[j]; kind[j] = tmp;
    end
    reset = 1'b1; ce_n = 1'b1; rd_n = 1'b1; wr_n = 1'b1; addr = '0; data_in = '0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;
    n = blk_len(3);

    for (int f = 0; f < FRAMES; f++) begin
      sent = make_block(3);
      rx = sent;
      nerr = kind[f];
      e1 = $urandom_range(0, n - 1);
      do e2 = $urandom_range(0, n - 1); while (e2 == e1);
      if (nerr >= 1) rx[e1] = ~rx[e1];
      if (nerr >= 2) rx[e2] = ~rx[e2];
      check(passes(rx, n, 3) == (nerr == 0), "host BCS check");
      if (passes(rx, n, 3)) continue;
      called++;
      fixed = 1'b0; used = 0;
      t0 = cycle;
      for (int s = 0; s < NS && !fixed; s++) begin
        bus_write(2'd0, 16'((s << 2) | 3));
        for (int i = 0; i < n; i++) bus_write(2'd1, {15'd0, rx[i]});
        bus_read(2'd1, st);
        check(st[0], "done after the last bit");
        used++;
        if (st[1]) begin
          bus_read(2'd0, rs);
          rx[rs[8:0]] = ~rx[rs[8:0]];
          fixed = 1'b1;
          if (nerr == 1) check(int'(rs[8:0]) == e1, "single error located");
        end
      end
      sections += used;
      if (used > max_sections) max_sections = used;
      if (cycle - t0 > worst) worst = cycle - t0;
      if (nerr == 1) check(fixed && rx == sent, $sformatf("frame %0d repaired", f));
      if (fixed) begin
        check(passes(rx, n, 3), "repaired block passes its BCS");
        if (rx == sent) recovered++;
        else miscorrected++;
      end
    end
    check(recovered == N_SINGLE, "every single-error block recovered");
    check(max_sections == NS, "a block needed all seven passes");
    // worst case: 7 passes of (1 CONFIG + 447 DATA) writes at 2 clocks each
    check(worst <= longint'(NS * (1 + n) * 2), "worst-case bus cycles per block");
    $display("frames=%0d called=%0d recovered=%0d miscorrected=%0d sections=%0d worst_cycles=%0d saved_retx=%0d%%",
             FRAMES, called, recovered, miscorrected, sections, worst, recovered * 100 / FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
