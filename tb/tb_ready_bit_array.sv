// tb_ready_bit_array: random test of the register ready-bit array.
//
// A small array (16 registers, 2 banks of 4 read ports, 2 write-back and 2
// allocation ports) is driven with random write-backs and allocations. A
// bit-per-register model in the testbench (set on write-back, cleared on
// allocation, clear winning) predicts every read port of every bank; the
// two banks must always agree with the model, i.e. hold the same copy.
module tb_ready_bit_array;
  import orbit_pkg::*;
  localparam int NP = 16, NB = 2, RP = 4, WW = 2, AW = 2;

  logic clk = 0, rst_n = 0;
  logic  alloc_v [AW];  preg_t alloc_preg [AW];
  logic  wb_v [WW];     preg_t wb_preg [WW];
  preg_t raddr [NB][RP];
  logic  rdata [NB][RP];
  int checks = 0, failures = 0;
  logic model [NP];

  ready_bit_array #(.NPREGS(NP), .NBANKS(NB), .RPORTS(RP), .WB_W(WW), .ALLOC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) model[i] = 1'b1;
    for (int a = 0; a < AW; a++) begin alloc_v[a] = 0; alloc_preg[a] = '0; end
    for (int w = 0; w < WW; w++) begin wb_v[w] = 0; wb_preg[w] = '0; end
    for (int b = 0; b < NB; b++) for (int p = 0; p < RP; p++) raddr[b][p] = preg_t'(p);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // check reads of the state left by the previous edge
      for (int b = 0; b < NB; b++)
        for (int p = 0; p < RP; p++) begin
          raddr[b][p] = preg_t'($urandom_range(NP - 1));
        end
      #1;
      for (int b = 0; b < NB; b++)
        for (int p = 0; p < RP; p++) begin
          checks++;
          if (rdata[b][p] !== model[raddr[b][p]]) begin
            failures++;
            if (failures < 10) $display("cyc %0d bank %0d port %0d reg %0d: got %b want %b",
                                        cyc, b, p, raddr[b][p], rdata[b][p], model[raddr[b][p]]);
          end
        end
      // new writes for the next edge
      for (int w = 0; w < WW; w++) begin
        wb_v[w] = ($urandom_range(1) == 1); wb_preg[w] = preg_t'($urandom_range(NP - 1));
      end
      for (int a = 0; a < AW; a++) begin
        alloc_v[a] = ($urandom_range(2) == 0); alloc_preg[a] = preg_t'($urandom_range(NP - 1));
      end
      for (int w = 0; w < WW; w++) if (wb_v[w]) model[wb_preg[w]] = 1'b1;
      for (int a = 0; a < AW; a++) if (alloc_v[a]) model[alloc_preg[a]] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
