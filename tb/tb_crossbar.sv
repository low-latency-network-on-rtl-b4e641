// tb_crossbar: random flits and selects; each output must carry the selected
// input's flit and follow valid.
module tb_crossbar;
  import noc_pkg::*;
  localparam int FW = 38;
  logic [P-1:0][FW-1:0] in_flit, out_flit;
  logic [P-1:0][PW-1:0] sel;
  logic [P-1:0] valid, out_wr;
  int checks = 0, failures = 0;

  crossbar #(.FW(FW)) dut (.in_flit, .sel, .valid, .out_flit, .out_wr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 500; c++) begin
      for (int i = 0; i < P; i++) begin
        int s;
        in_flit[i] = {6'($urandom), 32'($urandom)};
        do s = $urandom_range(0, P - 1); while (s == i);
        sel[i] = PW'(s);
        valid[i] = $urandom_range(0, 1);
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_flit[o] !== in_flit[sel[o]] || out_wr[o] !== valid[o]) begin
          failures++; $display("out %0d sel %0d", o, sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
