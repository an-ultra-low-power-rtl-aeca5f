// tb_aes_controller: drives the controller with random start_in, load_in
// and unload_in and compares the counter and every decoded output with a
// cycle-level model kept in the testbench (the rules of the counter and the
// comparator constants written out independently). Also runs one clean
// block and checks that comp rises exactly 159 clocks after the first load
// cycle and that 16 unload cycles return the counter to 0.
module tb_aes_controller;
  logic clk = 1'b0, rst_n, start_in, load_in, unload_in;
  logic [7:0] counter;
  logic busy_out, comp, key_shift_in, enable_input_mixcolumn, shift_mixcolumn;
  logic shift_pa2ser, load_pa2ser;
  logic [3:0] seq_in, step;
  int checks = 0, failures = 0;
  int model;

  aes_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (model counter %0d)", what, model); end
  endtask

  task automatic compare();
    bit busy;
    busy = model >= 16;
    check(counter == 8'(model), $sformatf("counter %0d", counter));
    check(busy_out == busy, "busy_out");
    check(comp == (model >= 159), "comp");
    check(enable_input_mixcolumn == busy, "enable_input_mixcolumn");
    check(shift_mixcolumn == (model % 4 != 0), "shift_mixcolumn");
    check(shift_pa2ser == (model >= 20), "shift_pa2ser");
    check(load_pa2ser == (busy && (model % 4 == 3)), "load_pa2ser");
    check(seq_in == (busy ? 4'(model / 16) : 4'd0), "seq_in");
    check(step == 4'(model % 16), "step");
    check(key_shift_in == !load_in, "key_shift_in");
  endtask

  // model of one rising edge
  function automatic int next_model(int m);
    bit go;
    if (m < 16)       go = load_in && start_in;
    else if (m > 158) go = unload_in;
    else              go = start_in;
    return go ? (m + 1) % 256 : 0;
  endfunction

  initial begin
    rst_n = 1'b0; start_in = 1'b0; load_in = 1'b0; unload_in = 1'b0;
    model = 0;
    #12 rst_n = 1'b1;
    // a clean block
    start_in = 1'b1; load_in = 1'b1;
    for (int cyc = 0; cyc < 176; cyc++) begin
      load_in = cyc < 16;
      unload_in = (cyc >= 159) && (cyc < 175);
      #1 compare();
      if (cyc < 159) check(!comp, "comp not before cycle 159");
      if (cyc == 159) check(comp, "comp at cycle 159");
      model = next_model(model);
      @(posedge clk);
      #1;
    end
    check(counter == 8'd0, "back to 0 after 16 unload cycles");
    // random stimulus, biased so that the counter does advance
    for (int n = 0; n < 3000; n++) begin
      start_in  = ($urandom_range(0, 9) != 0);
      load_in   = (model < 16) ? ($urandom_range(0, 19) != 0) : ($urandom_range(0, 9) == 0);
      unload_in = ($urandom_range(0, 3) != 0);
      #1 compare();
      model = next_model(model);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
