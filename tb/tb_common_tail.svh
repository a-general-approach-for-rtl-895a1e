// Common end of the block testbenches: wait for every instance's 'done',
// print the result line, and a watchdog that ends a hung run as a failure.
initial begin
  for (int n = 0; n < NCFG; n++) wait (done[n] === 1'b1);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin : watchdog
  #1_000_000;
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
