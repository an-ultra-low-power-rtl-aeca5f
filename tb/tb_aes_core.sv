// tb_aes_core: end-to-end test of the 8-bit AES-128 core at its default
// configuration.
//
// Encrypts the FIPS-197 appendix C.1 vector and a series of random
// plaintext/key pairs, comparing every ciphertext byte with the reference
// model in aes_model_pkg (and the C.1 result also with the published
// ciphertext). It checks the cycle budget: busy_out rises after the 16 load
// cycles and comp exactly 159 clocks after the first load cycle, i.e. the
// counter spans the 160 cycles of one block. It also exercises, and counts,
// each control mechanism of the core: pausing through the clock gate
// (start_in low mid-operation), aborting a load by dropping load_in,
// raising unload_in before completion, and not unloading at all (result
// discarded, core back to idle). A mechanism that never occurred counts as
// a failure. Inputs change 1 ns after the rising edge of clk_aes, while it
// is high, as the clock gate requires.
module tb_aes_core;
  import aes_model_pkg::*;

  localparam int NUM_RANDOM = 12;

  logic  clk_aes = 1'b0;
  logic  rst_n, start_in, load_in, unload_in;
  byte_t data_in, key_in, data_out;
  logic  busy_out, comp;

  int checks = 0, failures = 0;
  int n_pause = 0, n_abort = 0, n_early_unload = 0, n_discard = 0, n_blocks = 0;

  aes_core dut (
    .clk_aes(clk_aes), .rst_n(rst_n), .start_in(start_in), .load_in(load_in),
    .unload_in(unload_in), .data_in(data_in), .key_in(key_in),
    .busy_out(busy_out), .comp(comp), .data_out(data_out)
  );

  always #5 clk_aes = ~clk_aes;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one clock of clk_aes: inputs were set right after the previous rising
  // edge; outputs are looked at mid-cycle by the caller, then this waits
  // for the next rising edge and 1 ns more
  task automatic next_cycle();
    @(posedge clk_aes);
    #1;
  endtask

  // stop the core's clock for a few cycles and resume
  task automatic pause(input int n);
    start_in = 1'b0;
    repeat (n) next_cycle();
    start_in = 1'b1;
    n_pause++;
  endtask

  // encrypt one block. pause_at: logical cycle (0..175) before which the
  // clock is stopped, -1 for none. abort_at: load cycle at which load_in is
  // dropped once, -1 for none. early: raise unload_in this many cycles before
  // comp. discard: do not unload (then nothing is compared).
  task automatic run_block(input block_t pt, input block_t key,
                           input int pause_at, input int abort_at,
                           input int early, input bit discard,
                           output block_t ct);
    int cyc;
    if (abort_at >= 0) begin
      load_in = 1'b1;
      for (int k = 0; k < abort_at; k++) begin
        data_in = pt[k]; key_in = key[k];
        next_cycle();
      end
      load_in = 1'b0;
      next_cycle();
      #3 check(!busy_out && !comp, "idle again after an aborted load");
      next_cycle();
      n_abort++;
    end
    // load
    for (cyc = 0; cyc < 16; cyc++) begin
      if (cyc == pause_at) pause(3);
      load_in = 1'b1; data_in = pt[cyc]; key_in = key[cyc];
      #3 check(!busy_out, "busy_out low while loading");
      next_cycle();
    end
    load_in = 1'b0;
    data_in = 8'($urandom); key_in = 8'($urandom);
    // rounds 1..9
    for (; cyc < 159; cyc++) begin
      if (cyc == pause_at) pause(5);
      if (!discard && cyc == 159 - early) begin
        unload_in = 1'b1;
        if (early > 0) n_early_unload++;
      end
      #3;
      check(busy_out, "busy_out high during rounds");
      if (comp) check(1'b0, $sformatf("comp early at cycle %0d", cyc));
      next_cycle();
    end
    // cycle 159: comp must be up now
    if (!discard) unload_in = 1'b1;
    #3 check(comp, "comp high 159 clocks after the first load cycle");
    next_cycle();
    cyc++;
    if (discard) begin
      #3 check(!comp && !busy_out, "result discarded without unload_in");
      n_discard++;
      return;
    end
    for (int j = 0; j < 16; j++, cyc++) begin
      if (cyc == pause_at) pause(4);
      if (j == 15) unload_in = 1'b0;
      #3 ct[j] = data_out;
      check(comp, "comp held while unloading");
      next_cycle();
    end
    #3 check(!comp && !busy_out, "idle after unloading");
    n_blocks++;
  endtask

  block_t pt, key, ct, exp_ct;

  initial begin
    // the clock runs during reset so that the reset is seen at a clock edge
    // as well as asynchronously
    rst_n = 1'b0; start_in = 1'b1; load_in = 1'b0; unload_in = 1'b0;
    data_in = '0; key_in = '0;
    repeat (3) @(posedge clk_aes);
    #1 rst_n = 1'b1;
    next_cycle();
    next_cycle();
    #3 check(!busy_out && !comp, "idle after reset");
    next_cycle();

    // FIPS-197 appendix C.1
    for (int k = 0; k < 16; k++) begin
      pt[k]  = 8'(k * 8'h11);
      key[k] = 8'(k);
    end
    run_block(pt, key, -1, -1, 0, 1'b0, ct);
    exp_ct = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
               8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    for (int k = 0; k < 16; k++) begin
      check(ct[k] == exp_ct[k], $sformatf("C.1 byte %0d: got %02x expected %02x", k, ct[k], exp_ct[k]));
      check(encrypt(pt, key)[k] == exp_ct[k], "reference model agrees with C.1");
    end

    for (int n = 0; n < NUM_RANDOM; n++) begin
      int pause_at, abort_at, early;
      bit discard;
      for (int k = 0; k < 16; k++) begin
        pt[k] = 8'($urandom); key[k] = 8'($urandom);
      end
      pause_at = (n % 3 == 1) ? int'($urandom_range(0, 175)) : -1;
      abort_at = (n % 4 == 2) ? int'($urandom_range(1, 15)) : -1;
      early    = (n % 2 == 1) ? int'($urandom_range(1, 40)) : 0;
      discard  = (n == 5);
      run_block(pt, key, pause_at, abort_at, early, discard, ct);
      if (!discard) begin
        exp_ct = encrypt(pt, key);
        for (int k = 0; k < 16; k++)
          check(ct[k] == exp_ct[k], $sformatf("block %0d byte %0d: got %02x expected %02x",
                                              n, k, ct[k], exp_ct[k]));
      end
      // some idle cycles, sometimes with the clock stopped
      start_in = n[0];
      repeat (2) next_cycle();
      start_in = 1'b1;
    end

    check(n_blocks > 0,       "at least one block encrypted");
    check(n_pause > 0,        "clock gating pause happened");
    check(n_abort > 0,        "aborted load happened");
    check(n_early_unload > 0, "unload_in raised before completion happened");
    check(n_discard > 0,      "completion without unload happened");
    $display("blocks=%0d pauses=%0d aborts=%0d early_unloads=%0d discards=%0d",
             n_blocks, n_pause, n_abort, n_early_unload, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
