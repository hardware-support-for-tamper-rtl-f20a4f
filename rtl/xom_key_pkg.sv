// xom_key_pkg: the chip's RSA key pair used to recover XOM session keys.
//
// Each XOM processor holds its own private key; software vendors encrypt session keys
// with the matching public key (N, e). The private exponent D never leaves the chip.
// The values below are a 1024-bit test key (public exponent 65537) used as the default
// of the session-key unit; a production part would program its own key at manufacture.
package xom_key_pkg;

  localparam int unsigned KEY_BITS = 1024;

  localparam logic [KEY_BITS-1:0] RSA_N =
    1024'hafa929d18c2806414661f52a1cbfa1cf2ea6bbb231f41cd5f0ca18396e5a733457d8136b3fdd48bcc1c13409d281187294b27024763bca404e080f74b52e2879aeacf1c6b26de6d82adcec1d41f2724375e7d13121dad0bef160862d71e9c918b236c4c24f43a75da2415b13e5e612c27d45f7b5b380f94380594e16deaa4737;

  localparam logic [KEY_BITS-1:0] RSA_D =
    1024'ha600e9a23c1fbef984f821e67050b12bc85c8d58b3588cbfa9d472dc236b9b1fc63c4eedb5e6fb4c5696ad04f34848c04fc1e9b4ab7f897d07c11a4a22c6c23bda3a08bf146e603d611b876aaca7b6eb7ef626f0927c733ce0a1b21214e1d9e139775a813d137849342475d93457e29f884e1f180f46c87b152d42d9ca299691;

  localparam logic [KEY_BITS-1:0] RSA_E = 1024'd65537;

endpackage
