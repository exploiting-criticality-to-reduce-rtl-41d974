// tb_min_value_select: random valid/value patterns for a 5-entry and a
// 10-entry cache, compared with a reference scan (first empty entry, else the
// lowest-numbered entry of minimum value).
module tb_min_value_select;
  localparam int VW = 25;
  int checks = 0, failures = 0;

  logic [4:0]         va;
  logic [4:0][VW-1:0] xa;
  logic [2:0]         ia;
  logic [VW-1:0]      ma;
  logic               fa;
  logic [9:0]         vb;
  logic [9:0][VW-1:0] xb;
  logic [3:0]         ib;
  logic [VW-1:0]      mb;
  logic               fb;

  min_value_select #(.N(5),  .VALUE_W(VW)) u_a (va, xa, ia, ma, fa);
  min_value_select #(.N(10), .VALUE_W(VW)) u_b (vb, xb, ib, mb, fb);

  task automatic ref_scan(input int n, input logic [9:0] v, input logic [9:0][VW-1:0] x,
                          output int idx, output logic [VW-1:0] mv, output bit fr);
    fr = 0; idx = 0; mv = x[0];
    for (int i = 0; i < n; i++)
      if (!v[i]) begin fr = 1; idx = i; mv = 0; return; end
    for (int i = 1; i < n; i++)
      if (x[i] < mv) begin idx = i; mv = x[i]; end
  endtask

  initial begin
    int ri; logic [VW-1:0] rm; bit rf;
    logic [9:0] v; logic [9:0][VW-1:0] x;
    for (int t = 0; t < 3000; t++) begin
      v = (t % 4 == 0) ? 10'($urandom) : '1;
      for (int i = 0; i < 10; i++) x[i] = (t % 5 == 0) ? VW'($urandom_range(0, 3)) : VW'($urandom);
      va = v[4:0]; xa = x[4:0]; vb = v; xb = x;
      #1;
      ref_scan(5, v, x, ri, rm, rf);
      checks++;
      if (int'(ia) != ri || ma != rm || fa != rf) begin
        failures++; $display("FAIL N=5 t=%0d idx %0d/%0d min %0d/%0d free %0d/%0d", t, ia, ri, ma, rm, fa, rf);
      end
      ref_scan(10, v, x, ri, rm, rf);
      checks++;
      if (int'(ib) != ri || mb != rm || fb != rf) begin
        failures++; $display("FAIL N=10 t=%0d idx %0d/%0d", t, ib, ri);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
