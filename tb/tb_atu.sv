// tb_atu: self-checking test of the address translation unit.
//
// For every private window size and every core identifier, drives random
// logical addresses (biased towards the private window) and compares the
// physical address with a reference computed arithmetically: shared
// addresses pass unchanged, and offset o of the private window of core c maps
// to 2^AW - 2^(pb+ID_W) + c*2^pb + o. Also checks that the private regions of
// different cores never overlap each other or the shared section.
module tb_atu;
  localparam int unsigned AW   = 15;
  localparam int unsigned ID_W = 3;

  logic [ID_W-1:0] core_id;
  logic [3:0]      priv_bits;
  logic [AW-1:0]   laddr, paddr;
  logic            is_private;
  int checks = 0, failures = 0;

  atu #(.AW(AW), .ID_W(ID_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pb = 0; pb <= AW - ID_W; pb++) begin
      int win, top, base;
      win  = 1 << pb;
      top  = 1 << AW;
      base = top - (win << ID_W);
      for (int c = 0; c < (1 << ID_W); c++) begin
        for (int n = 0; n < 40; n++) begin
          int la, exp_pa;
          bit exp_priv;
          if (n % 2 == 0) la = top - win + $urandom_range(win - 1);
          else            la = $urandom_range(top - 1);
          exp_priv = (la >= top - win);
          exp_pa   = exp_priv ? base + c * win + (la - (top - win)) : la;
          priv_bits = pb[3:0]; core_id = c[ID_W-1:0]; laddr = la[AW-1:0];
          #1;
          checks++;
          if (is_private !== exp_priv || int'(paddr) != exp_pa) begin
            failures++;
            $display("FAIL pb=%0d core=%0d la=%h: got %h/%0b expected %h/%0b",
                     pb, c, la, paddr, is_private, exp_pa, exp_priv);
          end
          if (exp_priv) begin
            checks++;
            if (int'(paddr) < base || int'(paddr) >= base + (c + 1) * win || int'(paddr) < base + c * win) begin
              failures++;
              $display("FAIL pb=%0d core=%0d: private address %h outside own region", pb, c, paddr);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
