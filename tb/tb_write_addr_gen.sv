// tb_write_addr_gen: the generator with behavioural Free and Done FIFOs.
// After reset the Free FIFO must be filled with 0..cells-1; afterwards one
// address is taken per step (every clock at 40 MHz, every other clock at
// 20 MHz), Done addresses before Free ones; the WA output must follow.
// Emptying both FIFOs must set the fault flag.
`timescale 1ns/1ps
module tb_write_addr_gen;
  logic clk = 0, srst = 1, rate40 = 0;
  logic [7:0] cells = 20;
  logic done_pop, free_pop, fill_push, filling, step, step_phase, new_valid, bad_wa, fef;
  logic [7:0] fill_addr, new_addr, wa;
  logic [7:0] freeq [$], doneq [$];
  always #12.5 clk = !clk;
  write_addr_gen dut (.clk(clk), .srst(srst), .cells(cells), .rate40(rate40),
    .done_empty(doneq.size() == 0), .done_head(doneq.size() ? doneq[0] : 8'h0), .done_pop(done_pop),
    .free_empty(freeq.size() == 0), .free_head(freeq.size() ? freeq[0] : 8'h0), .free_pop(free_pop),
    .fill_push(fill_push), .fill_addr(fill_addr), .filling(filling), .step(step), .step_phase(step_phase),
    .new_addr(new_addr), .new_valid(new_valid), .wa(wa), .bad_wa(bad_wa), .free_empty_fault(fef));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  logic [7:0] exp_addr;
  bit exp_v;
  int steps = 0, cyc = 0;
  // the model is evaluated shortly before each rising edge and applied
  // just after it, so it never races the generator's own sampling
  bit dp, fp, fu;
  logic [7:0] fa;
  always @(negedge clk) if (!srst) begin
    #5;
    exp_v = 0;
    if (step && doneq.size()) begin exp_addr = doneq[0]; exp_v = 1; end
    else if (step && freeq.size()) begin exp_addr = freeq[0]; exp_v = 1; end
    check(new_valid == exp_v && (!exp_v || new_addr == exp_addr), $sformatf("pick cyc %0d", cyc));
    dp = done_pop; fp = free_pop; fu = fill_push; fa = fill_addr;
    if (step) steps++;
  end
  always @(posedge clk) if (!srst) begin
    cyc++;
    #1;
    if (dp) void'(doneq.pop_front());
    if (fp) void'(freeq.pop_front());
    if (fu) freeq.push_back(fa);
    if (exp_v) check(wa == exp_addr, "wa");
    dp = 0; fp = 0; fu = 0; exp_v = 0;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    repeat (cells) @(negedge clk);
    check(!filling && freeq.size() == cells, "filled");
    for (int i = 0; i < cells; i++) check(freeq[i] == 8'(i), "fill order");
    // 20 MHz: 100 clocks give 50 steps; recycle every address through Done
    steps = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      if (wa != 0 && $urandom_range(0, 1)) doneq.push_back(wa);
    end
    check(steps == 50, $sformatf("20 MHz steps %0d", steps));
    rate40 = 1; steps = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      doneq.push_back(wa);
    end
    check(steps == 100, $sformatf("40 MHz steps %0d", steps));
    check(!bad_wa && !fef, "no faults");
    // stop returning addresses: the Free FIFO runs dry
    repeat (60) @(negedge clk);
    check(fef, "free empty fault");
    doneq.push_back(8'd200); @(negedge clk); @(negedge clk);
    check(bad_wa, "bad write address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
