// Self-checking test of the blow acceleration logic: pointer_bit is the
// to-be-programmed bit under the one-hot pointer.
module tb_blow_accel;
  localparam int N = 68;
  logic [N-1:0] ptr, fuse_val_i;
  logic pointer_bit;
  int checks = 0, failures = 0;
  blow_accel #(.N_FUSE(N)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      automatic int k = $urandom_range(N - 1);
      fuse_val_i = N'({$urandom, $urandom, $urandom});
      ptr = N'(1) << k; #1;
      checks++; if (pointer_bit !== fuse_val_i[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
