// tb_femip_full: end-to-end run of femip_top with every parameter at its
// default (1024x1024 frames, threshold band 256..1024, 1024-entry features
// buffer, 512-pair matched buffer). The scene has 6x6 squares; see
// femip_bench for the checks.
module tb_femip_full;
  femip_bench #(.FULL(1), .W(1024), .H(1024), .NSQ(6), .NFRAMES(7), .SKIP_AT(-1),
                .WDOG(64'd40000000)) bench ();
endmodule
