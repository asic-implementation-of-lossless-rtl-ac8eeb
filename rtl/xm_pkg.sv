// xm_pkg: constants shared by the X-Match compressor and decompressor.
// The word width (32 bits) and the dictionary address width (6 bits, so a
// 64-word dictionary) are the sizes the design is built around; every module
// takes them as parameter defaults from here.
package xm_pkg;
  localparam int unsigned XM_DATA_W = 32;  // word width of data in / data out
  localparam int unsigned XM_ADDR_W = 6;   // dictionary address width
endpackage
