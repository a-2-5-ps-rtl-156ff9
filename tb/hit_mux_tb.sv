`timescale 1ps/1fs
// hit_mux_tb: drives random slave clock levels and every select value into
// a 5-input hit_mux and checks that the output equals the selected input,
// and is low for select values past the last input.
module hit_mux_tb;
  localparam int unsigned N = 5;
  localparam int unsigned SW = 3;

  logic [N-1:0]  slave_clk;
  logic [SW-1:0] sel;
  logic          hit;
  int checks = 0;
  int failures = 0;

  hit_mux #(.N_SLAVES(N), .SEL_W(SW)) dut (.slave_clk(slave_clk), .sel(sel), .hit(hit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int n = 0; n < 200; n++) begin
      slave_clk = N'($urandom);
      sel       = SW'($urandom_range(7));
      #10;
      expected = (int'(sel) < N) ? slave_clk[sel] : 1'b0;
      checks++;
      if (hit !== expected) begin
        failures++;
        $display("FAIL sel=%0d in=%b hit=%b", sel, slave_clk, hit);
      end
    end
    // Each input alone, through its own select.
    for (int i = 0; i < N; i++) begin
      slave_clk = N'(1) << i;
      for (int s = 0; s < N; s++) begin
        sel = SW'(s);
        #10;
        checks++;
        if (hit !== (s == i)) begin
          failures++;
          $display("FAIL onehot i=%0d sel=%0d hit=%b", i, s, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
