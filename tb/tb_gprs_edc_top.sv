// tb_gprs_edc_top: end-to-end test of the EDC co-processor at its default
// size (64 CRC units, 7 sections), driven over its bus like the baseband DSP
// would drive it.
//
// For random blocks of all four coding schemes with no error, one error or
// two errors, the host runs section after section: CONFIG write, one DATA
// write per bit, then STATUS and RESULT reads in the cycle straight after
// the last bit. The expected outcome of every section is the set of
// positions whose single inversion makes the block pass, found by brute
// force with the long-division reference. A found position is used to
// repair the block, which must then equal the block as sent.
//
// Also exercised and counted: bits written after the end of the block
// (ignored), sections that run past the end of a short block (their spare
// units masked), a pass cut short by a new CONFIG write, and the reset pin.
module tb_gprs_edc_top;
  import gprs_edc_pkg::*;
  import tb_gprs_pkg::*;

  localparam int N  = 64;
  localparam int NS = 7;

  logic clk = 1'b0, reset;
  logic ce_n, rd_n, wr_n;
  logic [1:0] addr;
  logic [15:0] data_in, data_out;
  logic data_oe;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_cs[4];
  int n_found_first, n_found_later, n_found_last, n_not_found, n_double;
  int n_extra_bits, n_masked, n_abort, n_reset, n_sections, n_clean;

  gprs_edc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One write: strobe low for one clock, high for one clock.
  task automatic bus_write(logic [1:0] a, logic [15:0] d);
    ce_n = 1'b0; wr_n = 1'b0; addr = a; data_in = d;
    @(posedge clk); #1;
    wr_n = 1'b1; ce_n = 1'b1;
    @(posedge clk); #1;
  endtask

  task automatic bus_read(logic [1:0] a, output logic [15:0] d);
    ce_n = 1'b0; rd_n = 1'b0; addr = a;
    #1; d = data_out;
    check(data_oe, "data_oe during read");
    ce_n = 1'b1; rd_n = 1'b1;
  endtask

  // Run one section; returns found flag and position.
  task automatic run_section(blk_t b, int n, int cs, int s, int extra,
                             output bit fnd, output int p, output bit amb);
    logic [15:0] st, rs;
    bus_write(2'd0, 16'((s << 2) | cs));
    for (int i = 0; i < n; i++) bus_write(2'd1, {15'd0, b[i]});
    // result must be there the cycle after the last bit
    bus_read(2'd1, st);
    check(st[0] == 1'b1, "done straight after the last bit");
    check(st[12:4] == 9'(n), "bit count");
    for (int i = 0; i < extra; i++) bus_write(2'd1, 16'($urandom));
    if (extra > 0) begin
      bus_read(2'd1, rs);
      check(rs == st, "bits after the end of the block are ignored");
      n_extra_bits++;
    end
    bus_read(2'd0, rs);
    fnd = st[1]; amb = st[2]; p = int'(rs[8:0]);
    n_sections++;
  endtask

  initial begin
    blk_t sent, rx, cand;
    int n, cs, nerr, e1, e2, p, first_exp, cnt_exp;
    bit fnd, amb, done_blk;
    bit exp_flip[MAXLEN];
    logic [15:0] st;

    n_found_first = 0; n_found_later = 0; n_found_last = 0; n_not_found = 0; n_double = 0;
    n_extra_bits = 0; n_masked = 0; n_abort = 0; n_reset = 0; n_sections = 0; n_clean = 0;
    foreach (n_cs[i]) n_cs[i] = 0;
    reset = 1'b1; ce_n = 1'b1; rd_n = 1'b1; wr_n = 1'b1; addr = '0; data_in = '0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;

    for (int t = 0; t < 32; t++) begin
      cs = t % 4;
      n = blk_len(cs);
      n_cs[cs]++;
      sent = make_block(cs);
      rx = sent;
      nerr = (t < 4) ? 0 : (t < 28) ? 1 : 2;
      // the last-section case: a CS-4 error at the block's final bits
      e1 = (t == 7) ? n - 1 : (t == 11) ? 6 * N + 5 : $urandom_range(0, n - 1);
      do e2 = $urandom_range(0, n - 1); while (e2 == e1);
      if (nerr >= 1) rx[e1] = ~rx[e1];
      if (nerr >= 2) rx[e2] = ~rx[e2];
      if (nerr == 2) n_double++;
      if (nerr == 0) n_clean++;
      for (int k = 0; k < n; k++) begin
        cand = rx;
        cand[k] = ~cand[k];
        exp_flip[k] = passes(cand, n, cs);
      end
      check(nerr != 1 || exp_flip[e1], "reference finds the planted error");

      // an aborted pass first, on some blocks: half a block then a new CONFIG
      if (t % 5 == 2) begin
        bus_write(2'd0, 16'(cs));
        for (int i = 0; i < n / 2; i++) bus_write(2'd1, {15'd0, rx[i]});
        n_abort++;
      end
      if (t % 9 == 4) begin
        bus_write(2'd0, 16'(cs));
        for (int i = 0; i < 20; i++) bus_write(2'd1, {15'd0, rx[i]});
        reset = 1'b1; @(posedge clk); #1; reset = 1'b0;
        bus_read(2'd1, st);
        check(st == 0, "reset clears status");
        n_reset++;
      end

      done_blk = 1'b0;
      for (int s = 0; s < NS && !done_blk; s++) begin
        if (s * N >= n) break;
        first_exp = -1; cnt_exp = 0;
        for (int k = s * N; k < s * N + N && k < n; k++)
          if (exp_flip[k]) begin
            if (first_exp < 0) first_exp = k;
            cnt_exp++;
          end
        run_section(rx, n, cs, s, (t % 3 == 0) ? 3 : 0, fnd, p, amb);
        check(fnd == (first_exp >= 0), $sformatf("found flag t=%0d cs=%0d s=%0d", t, cs, s));
        check(amb == (cnt_exp > 1), "ambiguity flag");
        if (s * N + N > n && !fnd) n_masked++;
        if (fnd) begin
          check(p == first_exp, $sformatf("position t=%0d got %0d want %0d", t, p, first_exp));
          rx[p] = ~rx[p];
          check(nerr != 1 || rx == sent, "repaired block equals the sent block");
          if (s == 0) n_found_first++;
          else n_found_later++;
          if (s == NS - 1) n_found_last++;
          done_blk = 1'b1;
        end
      end
      if (!done_blk) begin
        n_not_found++;
        check(nerr != 1, "single error left uncorrected");
      end
    end

    // every mechanism must have happened
    foreach (n_cs[i]) check(n_cs[i] > 0, $sformatf("coding scheme CS-%0d used", i + 1));
    check(n_found_first > 0, "correction in the first section");
    check(n_found_later > 0, "correction in a later section");
    check(n_found_last > 0, "correction in the seventh section");
    check(n_not_found > 0, "block with no single-bit correction");
    check(n_clean > 0, "error-free block");
    check(n_double > 0, "double-error block");
    check(n_extra_bits > 0, "bits after the end ignored");
    check(n_masked > 0, "spare units past the block end masked");
    check(n_abort > 0, "pass cut short by CONFIG");
    check(n_reset > 0, "reset pin");
    $display("sections=%0d found_first=%0d found_later=%0d found_last=%0d not_found=%0d masked=%0d abort=%0d reset=%0d",
             n_sections, n_found_first, n_found_later, n_found_last, n_not_found, n_masked, n_abort, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
