// tb_crossbar_switch: random selects and enables on the 9x9, 256-bit
// crossbar; every output must equal the selected input when enabled and be
// zero otherwise.
module tb_crossbar_switch;
  import mpnoc_pkg::*;
  localparam int N = NUM_PORTS, W = FLIT_W;
  logic [W-1:0] in_data [N];
  port_id_t     sel     [N];
  logic [N-1:0] en;
  logic [W-1:0] out_data[N];
  int checks = 0, failures = 0;

  crossbar_switch dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int i = 0; i < N; i++) begin
        in_data[i] = {8{$urandom()}};
        sel[i]     = port_id_t'($urandom_range(0, N - 1));
      end
      en = N'($urandom());
      #1;
      for (int o = 0; o < N; o++) begin
        logic [W-1:0] exp;
        exp = en[o] ? in_data[int'(sel[o])] : '0;
        checks++;
        if (out_data[o] !== exp) begin
          failures++;
          if (failures < 10) $display("it %0d out %0d mismatch", it, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
