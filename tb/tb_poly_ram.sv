// tb_poly_ram: random reads and writes on both ports against an array model;
// checks one-cycle read latency, read-old-data on a same-address write,
// that nothing is written while we = 0, and port 2 priority on a collision.
module tb_poly_ram;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [7:0]  r1, w1, r2, w2;
  logic [15:0] d1, d2, q1, q2;
  logic [15:0] model [256];

  poly_ram dut (.clk, .we,
    .p1_raddr(r1), .p1_waddr(w1), .p1_wdata(d1), .p1_rdata(q1),
    .p2_raddr(r2), .p2_waddr(w2), .p2_wdata(d2), .p2_rdata(q2));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e1, e2;
    // fill
    for (int i = 0; i < 256; i += 2) begin
      @(negedge clk);
      we = 1; w1 = 8'(i); w2 = 8'(i + 1); d1 = 16'($urandom); d2 = 16'($urandom);
      r1 = 0; r2 = 0;
      model[i] = d1; model[i + 1] = d2;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      r1 = 8'($urandom); r2 = 8'($urandom);
      w1 = 8'($urandom); w2 = (i % 50 == 0) ? w1 : 8'($urandom);
      if (i % 13 == 0) w1 = r1;
      d1 = 16'($urandom); d2 = 16'($urandom);
      e1 = model[r1]; e2 = model[r2];
      if (we) begin model[w1] = d1; model[w2] = d2; end
      @(negedge clk);
      checks += 2;
      if (q1 !== e1 || q2 !== e2) begin
        failures++;
        $display("FAIL read %0d,%0d: %h,%h expected %h,%h", r1, r2, q1, q2, e1, e2);
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
