// gmo_pkg: shared types and constants of the GMO line-buffer design.
//
// A global memory object (GMO) is the set of line buffers of one
// neighbourhood operator stored side by side in one wide word, so that one
// pointer serves all of them. Its width is the number of buffered lines
// times the pixel width. The GMO is then cut into segments whose widths a
// Block RAM port supports, and each segment into partitions that fit into
// one Block RAM port.
//
// The constants below describe the worked example of the design: a 5x5
// window on a 640-pixel line of 12-bit pixels needs four line buffers, so
// the GMO is 640 words of 48 bits. On a Spartan-3 device (16 kbit Block RAMs,
// port widths 1/2/4/8/16/32) it is split into a 32-bit segment (512 words in
// BR1 port A, 128 words in BR2 port B at word offset 320) and a 16-bit
// segment (640 words in BR2 port A). The partition table is the output of
// the allocation step and is fixed here, it is not computed in hardware.
package gmo_pkg;

  // Which pointer scheme drives the Block RAM ports.
  typedef enum logic {
    ADDR_BASE_POINTER = 1'b0,  // one pointer per GMO, decoded per partition
    ADDR_DISTRIBUTED  = 1'b1   // one local pointer per partition
  } addr_scheme_e;

  // Block RAM geometry (parity bits not used).
  localparam int unsigned BRAM_BITS = 16384;

  // Worked example: 5x5 window, 12-bit pixels, 640 pixels per line.
  localparam int unsigned PIX_W   = 12;
  localparam int unsigned WIN_N   = 5;
  localparam int unsigned N_LINES = WIN_N - 1;         // line buffers needed
  localparam int unsigned LINE_L  = 640;               // GMO length
  localparam int unsigned GMO_W   = N_LINES * PIX_W;   // 48
  localparam int unsigned SEG1_W  = 32;                // first segment width
  localparam int unsigned SEG2_W  = GMO_W - SEG1_W;    // 16

  // Partition table of the example (allocation result).
  // Index 0: BR1 port A, segment 1, 512 x 32, GMO words   0..511
  // Index 1: BR2 port B, segment 1, 128 x 32, GMO words 512..639
  // Index 2: BR2 port A, segment 2, 640 x 16, GMO words   0..639
  localparam int unsigned NPART   = 3;
  localparam int unsigned ADDR_W  = 10;  // widest port address (1024 x 16)
  // Partition indices of the example.
  localparam int unsigned P_BR1_A = 0;
  localparam int unsigned P_BR2_B = 1;
  localparam int unsigned P_BR2_A = 2;

  typedef int unsigned part_tab_t [NPART];

  localparam part_tab_t FIG5_SEG    = '{1, 1, 2};       // segment of partition
  localparam part_tab_t FIG5_START  = '{0, 512, 0};     // first GMO word held
  localparam part_tab_t FIG5_LEN    = '{512, 128, 640}; // words held
  localparam part_tab_t FIG5_OFFSET = '{0, 320, 0};     // start address in port
  localparam part_tab_t FIG5_RAM    = '{0, 1, 1};       // Block RAM (BR1 = 0)
  localparam part_tab_t FIG5_PORT   = '{0, 1, 0};       // port, 0 = A, 1 = B
  localparam part_tab_t FIG5_GMO    = '{0, 0, 0};       // GMO of partition

  // Block RAMs of the example and the data width of each of their ports.
  localparam int unsigned NRAM = 2;
  typedef int unsigned ram_tab_t [NRAM];
  localparam ram_tab_t FIG5_WA = '{32, 16};
  localparam ram_tab_t FIG5_WB = '{32, 32};

  // Segments of the example: lowest GMO bit and width of each.
  localparam int unsigned NSEG = 2;
  typedef int unsigned seg_tab_t [NSEG];
  localparam seg_tab_t FIG5_SEG_LO = '{0, 32};
  localparam seg_tab_t FIG5_SEG_W  = '{32, 16};
  localparam seg_tab_t FIG5_SEG_GMO = '{0, 0};         // GMO of segment

endpackage
