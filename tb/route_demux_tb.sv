// route_demux_tb: every combination of enable and the S1/S2 select lines with
// random register values; checks source choice, destination and strobes.
module route_demux_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  localparam int W = 19;
  logic         en;
  route_sel_t   sel;
  logic [W-1:0] r31, r32, fb_data, bus_data;
  logic         fb_valid, bus_valid;

  route_demux #(.W(W)) dut (.en, .sel, .r31, .r32, .fb_data, .fb_valid, .bus_data, .bus_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int m = 0; m < 8; m++) begin
        logic [W-1:0] src;
        logic efb, ebus;
        r31 = W'($urandom);
        r32 = W'($urandom);
        en  = m[2];
        sel.s1 = m[1];
        sel.s2 = m[0];
        #1;
        src  = sel.s1 ? r32 : r31;
        efb  = en && !sel.s2;
        ebus = en && sel.s2;
        checks++;
        if (fb_valid !== efb || bus_valid !== ebus ||
            (efb && fb_data !== src) || (ebus && bus_data !== src)) begin
          failures++;
          $display("FAIL en=%0b s1=%0b s2=%0b", en, sel.s1, sel.s2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
