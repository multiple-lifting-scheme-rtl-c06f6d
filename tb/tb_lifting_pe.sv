// tb_lifting_pe: drives whole 1-D signals through the lifting PE one sample
// pair per step, keeping the four core registers in the testbench, and
// compares every lowpass/highpass pair with dwt_ref_pkg's array transform
// (symmetric extension). Signals of several even lengths, a ramp and random
// data in [-2000, 2000]; the boundary flags are set from the step number.
module tb_lifting_pe;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  data_t       a, b, low, high;
  lift_state_t st, st_out;
  lift_flags_t flags;
  int checks = 0, failures = 0;

  lifting_pe dut (.a, .b, .st_in(st), .flags, .st_out, .low, .high);

  task automatic run_signal(input int len, input int kind);
    longint x[], lo[], hi[];
    x = new[len];
    foreach (x[i]) x[i] = (kind == 0) ? longint'(i * 9 - 40) : longint'($urandom_range(0, 4000)) - 2000;
    fwd97(x, lo, hi);
    st = '{default: '0};
    for (int k = 0; k <= len/2 + 1; k++) begin
      a = (2*k-1 >= 0 && 2*k-1 < len) ? data_t'(x[2*k-1]) : data_t'(16'h1234);
      b = (2*k < len) ? data_t'(x[2*k]) : data_t'(16'h4321);
      flags.first1 = (k == 1);
      flags.first2 = (k == 2);
      flags.last   = (k == len/2);
      flags.flush  = (k == len/2 + 1);
      #1;
      if (k >= 2) begin
        checks++;
        if (longint'(low) != lo[k-2] || longint'(high) != hi[k-2]) begin
          failures++;
          $display("FAIL: len %0d step %0d got (%0d,%0d) expected (%0d,%0d)",
                   len, k, low, high, lo[k-2], hi[k-2]);
        end
      end
      // register values leave the PE unchanged in the x_even slot
      checks++;
      if (st_out.x_even != b) begin
        failures++;
        $display("FAIL: x_even register not loaded with b");
      end
      st = st_out;
      #1;
    end
  endtask

  initial begin
    run_signal(4, 0);
    run_signal(16, 0);
    for (int n = 0; n < 40; n++) run_signal(4 + 2 * $urandom_range(0, 30), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
